// demux4_cut: 4-output demultiplexer (2-to-4 decoder with enable), the
// circuit under test of the second MDSC example.
//
// X(2) is the data/enable input, X(3) X(4) the select code, and X(1) must
// be 0 for any output to be active:
//   O1 = X1' X2 X3' X4'   O2 = X1' X2 X3' X4
//   O3 = X1' X2 X3  X4'   O4 = X1' X2 X3  X4
// Each output is 1 for exactly one of the 16 input vectors (weight 1).
//
// The model is gate-level, following the circuit's published drawing: an
// inverter on X1, two inverters in a chain on X3 and on X4 (the first gives
// the complement, the second the true value), and one 4-input AND per
// output. The drawing numbers no lines; this design numbers them:
//   1..4   X1..X4                 5      X1' (inverter on X1)
//   6, 7   X3', X3 (inverter chain)      8, 9   X4', X4
//   10..13 O1..O4 (AND outputs)
//   14..17 branches of X2 into the ANDs of O1..O4
//   18..21 branches of X1' into the ANDs of O1..O4
//   22..24 branches of X3' into the second inverter and the ANDs of O1, O2
//   25, 26 branches of line 7 into the ANDs of O3, O4
//   27..29 branches of X4' into the second inverter and the ANDs of O1, O3
//   30, 31 branches of line 9 into the ANDs of O2, O4
// A fault on a stem acts on all its branches; a fault on a branch acts on
// one gate input only. `fault` places one of the 62 single stuck-at faults.
// Combinational. x[0] = X(1), o[0] = O(1).
module demux4_cut
  import mdsc_pkg::*;
(
  input  logic [3:0]   x,
  input  stuck_fault_t fault,
  output logic [3:0]   o
);
  logic [31:1] l;

  always_comb begin
    for (int i = 1; i <= 4; i++) l[i] = on_line(x[i-1], i, fault);
    // inverters and their fan-out branches
    l[5]  = on_line(!l[1], 5, fault);
    l[6]  = on_line(!l[3], 6, fault);
    l[22] = on_line(l[6], 22, fault);
    l[23] = on_line(l[6], 23, fault);
    l[24] = on_line(l[6], 24, fault);
    l[7]  = on_line(!l[22], 7, fault);
    l[8]  = on_line(!l[4], 8, fault);
    l[27] = on_line(l[8], 27, fault);
    l[28] = on_line(l[8], 28, fault);
    l[29] = on_line(l[8], 29, fault);
    l[9]  = on_line(!l[27], 9, fault);
    for (int k = 0; k < 4; k++) begin
      l[14 + k] = on_line(l[2], 14 + k, fault);
      l[18 + k] = on_line(l[5], 18 + k, fault);
    end
    l[25] = on_line(l[7], 25, fault);
    l[26] = on_line(l[7], 26, fault);
    l[30] = on_line(l[9], 30, fault);
    l[31] = on_line(l[9], 31, fault);
    // 4-input AND gates
    l[10] = on_line(l[18] & l[14] & l[23] & l[28], 10, fault);
    l[11] = on_line(l[19] & l[15] & l[24] & l[30], 11, fault);
    l[12] = on_line(l[20] & l[16] & l[25] & l[29], 12, fault);
    l[13] = on_line(l[21] & l[17] & l[26] & l[31], 13, fault);
    o = l[13:10];
  end
endmodule
