// fig6_cut: the two-output circuit used to walk through the Boolean
// difference algorithm.
//
//   O1 = X1 X2 + X2' X3'        O2 = X4 X5 X2' X3'
// Lines as numbered in its drawing: X1..X5 = 1..5, line 6 = X1 X2,
// line 7 = (X2 + X3)' = X2' X3', line 8 = X4 X5, O1 = line 9 = 6 + 7,
// O2 = line 10 = 7 . 8.  Line 7 is the one line both outputs depend on.
// `fault` places a stuck-at fault on any numbered line.  Combinational.
// x[0] = X1, o[0] = O1.
module fig6_cut
  import mdsc_pkg::*;
(
  input  logic [4:0]   x,
  input  stuck_fault_t fault,
  output logic [1:0]   o
);
  logic [10:1] l;

  always_comb begin
    for (int i = 1; i <= 5; i++) l[i] = on_line(x[i-1], i, fault);
    l[6]  = on_line(l[1] & l[2], 6, fault);
    l[7]  = on_line(!(l[2] | l[3]), 7, fault);
    l[8]  = on_line(l[4] & l[5], 8, fault);
    l[9]  = on_line(l[6] | l[7], 9, fault);
    l[10] = on_line(l[7] & l[8], 10, fault);
  end

  assign o = {l[10], l[9]};
endmodule
