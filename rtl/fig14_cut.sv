// fig14_cut: F = x1 x2' x3' + x4' x5 x6, a fan-out-free circuit, hence
// syndrome-testable: its syndrome is 15/64, and with x1 stuck at 1 it is
// 22/64 (11/32), so the ones count exposes the fault.  Inputs x1..x6 are
// lines 1..6 and F is line 7 (this design's numbering) for `fault`.
// Combinational.  x[0] = x1.
module fig14_cut
  import mdsc_pkg::*;
(
  input  logic [5:0]   x,
  input  stuck_fault_t fault,
  output logic         f
);
  logic [5:0] xf;
  always_comb begin
    for (int i = 0; i < 6; i++) xf[i] = on_line(x[i], i + 1, fault);
    f = on_line((xf[0] & !xf[1] & !xf[2]) | (!xf[3] & xf[4] & xf[5]), 7, fault);
  end
endmodule
