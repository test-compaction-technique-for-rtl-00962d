// bcd_encoder_cut: ten-line decimal to 8421 BCD converter, the circuit under
// test of the main MDSC example.
//
// Inputs X1..X9 (x[0] = X1) carry the decimal digit as a one-of-nine code
// (all zero = digit 0). Outputs O1..O4 (o[0] = O1) give the BCD code with
// weights 1, 2, 4, 8:
//   O1 = X1+X3+X5+X7+X9   O2 = X2+X3+X6+X7   O3 = X4+X5+X6+X7   O4 = X8+X9
// Over the ten decimal codes the output sequences are 155h, 0CCh, 03Ch and
// 003h, of weights 5, 4, 4, 2.
//
// The model is gate-level, following the circuit's published drawing: six
// two-input NOR gates, three NAND gates and an inverter. Lines 1..19 are
// numbered as in that drawing. The drawing's input lines do not follow the
// X order: line 1..9 carry X1, X3, X5, X7, X2, X6, X4, X8, X9. The gates are
//   10 = NOR(1, 9)   11 = NOR(2, 4)   12 = NOR(3, 4)
//   13 = NOR(5, 6)   14 = NOR(7, 6)   15 = NOR(8, 9)
//   O1 = 16 = NAND(10, 11, 12)   O2 = 17 = NAND(11, 13)
//   O3 = 18 = NAND(12, 14)       O4 = 19 = NOT(15)
// Lines 4, 6, 9, 11 and 12 fan out to two gates each. Each branch is a line
// of its own, numbered 20..29 here (this numbering is this design's own):
//   20, 21: line 4 into gates 2, 3     22, 23: line 6 into gates 4, 5
//   24, 25: line 9 into gates 1, 6     26, 27: line 11 into gates 7, 8
//   28, 29: line 12 into gates 7, 9
// A fault on a stem acts on both its branches; a fault on a branch acts on
// one gate input only. 29 lines give the 58 single stuck-at faults of the
// circuit. `fault` places one of them. Combinational.
module bcd_encoder_cut
  import mdsc_pkg::*;
(
  input  logic [8:0]   x,
  input  stuck_fault_t fault,
  output logic [3:0]   o
);
  logic [29:1] l;

  always_comb begin
    // input lines in drawing order
    l[1] = on_line(x[0], 1, fault);
    l[2] = on_line(x[2], 2, fault);
    l[3] = on_line(x[4], 3, fault);
    l[4] = on_line(x[6], 4, fault);
    l[5] = on_line(x[1], 5, fault);
    l[6] = on_line(x[5], 6, fault);
    l[7] = on_line(x[3], 7, fault);
    l[8] = on_line(x[7], 8, fault);
    l[9] = on_line(x[8], 9, fault);
    // fan-out branches of the inputs
    l[20] = on_line(l[4], 20, fault);
    l[21] = on_line(l[4], 21, fault);
    l[22] = on_line(l[6], 22, fault);
    l[23] = on_line(l[6], 23, fault);
    l[24] = on_line(l[9], 24, fault);
    l[25] = on_line(l[9], 25, fault);
    // NOR gates 1..6
    l[10] = on_line(!(l[1] | l[24]), 10, fault);
    l[11] = on_line(!(l[2] | l[20]), 11, fault);
    l[12] = on_line(!(l[3] | l[21]), 12, fault);
    l[13] = on_line(!(l[5] | l[22]), 13, fault);
    l[14] = on_line(!(l[7] | l[23]), 14, fault);
    l[15] = on_line(!(l[8] | l[25]), 15, fault);
    // fan-out branches of lines 11 and 12
    l[26] = on_line(l[11], 26, fault);
    l[27] = on_line(l[11], 27, fault);
    l[28] = on_line(l[12], 28, fault);
    l[29] = on_line(l[12], 29, fault);
    // NAND gates 7..9 and inverter 10
    l[16] = on_line(!(l[10] & l[26] & l[28]), 16, fault);
    l[17] = on_line(!(l[27] & l[13]), 17, fault);
    l[18] = on_line(!(l[29] & l[14]), 18, fault);
    l[19] = on_line(!l[15], 19, fault);
    o = l[19:16];
  end
endmodule
