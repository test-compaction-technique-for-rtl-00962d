// bcd_gate_ref.svh: reference model of the gate-level decimal-to-BCD
// converter, shared by the test benches. It is written as a net list: row r
// of the tables below produces line NET_LINE[r] with gate NET_KIND[r] from
// the lines NET_A/B/C[r] (0 = unused). Lines are numbered as in
// bcd_encoder_cut (1..19 from the circuit drawing, 20..29 for the fan-out
// branches). Rows are in evaluation order. `xv` is indexed by X number;
// fl = 0 means no fault. Include it inside a module.

localparam int BCD_LINES = 29;

// input line n of the drawing carries X(BCD_XOF[n])
localparam int BCD_XOF [1:9] = '{1, 3, 5, 7, 2, 6, 4, 8, 9};

// gate kinds: 0 input, 1 fan-out branch, 2 NOR, 3 NAND, 4 NOT
localparam int NET_LINE [29] = '{1, 2, 3, 4, 5, 6, 7, 8, 9,
                                 20, 21, 22, 23, 24, 25,
                                 10, 11, 12, 13, 14, 15,
                                 26, 27, 28, 29,
                                 16, 17, 18, 19};
localparam int NET_KIND [29] = '{0, 0, 0, 0, 0, 0, 0, 0, 0,
                                 1, 1, 1, 1, 1, 1,
                                 2, 2, 2, 2, 2, 2,
                                 1, 1, 1, 1,
                                 3, 3, 3, 4};
localparam int NET_A    [29] = '{0, 0, 0, 0, 0, 0, 0, 0, 0,
                                 4, 4, 6, 6, 9, 9,
                                 1, 2, 3, 5, 7, 8,
                                 11, 11, 12, 12,
                                 10, 27, 29, 15};
localparam int NET_B    [29] = '{0, 0, 0, 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0,
                                 24, 20, 21, 22, 23, 25,
                                 0, 0, 0, 0,
                                 26, 13, 14, 0};
localparam int NET_C    [29] = '{0, 0, 0, 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0, 0, 0,
                                 0, 0, 0, 0,
                                 28, 0, 0, 0};

function automatic logic [3:0] bcd_gate_ref(logic [9:1] xv, int fl, int fs);
  logic [29:0] v;
  v = '0;
  v[0] = 1'b1;   // an unused NAND input reads line 0, held at 1
  for (int r = 0; r < 29; r++) begin
    logic g;
    case (NET_KIND[r])
      0:       g = xv[BCD_XOF[NET_LINE[r]]];
      1:       g = v[NET_A[r]];
      2:       g = !(v[NET_A[r]] | v[NET_B[r]]);
      3:       g = !(v[NET_A[r]] & v[NET_B[r]] & v[NET_C[r]]);
      default: g = !v[NET_A[r]];
    endcase
    v[NET_LINE[r]] = (NET_LINE[r] == fl) ? (fs != 0) : g;
  end
  return v[19:16];
endfunction
