// fig13_cut: F = x1 x2' x3' + x1' x2 x3, a circuit with reconvergent fan-out
// that is syndrome-untestable: its syndrome is 2/8, and with x1 stuck at 1
// (F = x2' x3') it is still 2/8, so a ones-counting signature misses the
// fault.  Inputs x1..x3 are lines 1..3 and output F is line 4 (this
// design's numbering) for `fault`.  Combinational.  x[0] = x1.
module fig13_cut
  import mdsc_pkg::*;
(
  input  logic [2:0]   x,
  input  stuck_fault_t fault,
  output logic         f
);
  logic [2:0] xf;
  always_comb begin
    for (int i = 0; i < 3; i++) xf[i] = on_line(x[i], i + 1, fault);
    f = on_line((xf[0] & !xf[1] & !xf[2]) | (!xf[0] & xf[1] & xf[2]), 4, fault);
  end
endmodule
