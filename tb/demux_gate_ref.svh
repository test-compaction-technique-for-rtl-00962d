// demux_gate_ref.svh: reference model of the gate-level 4-output
// demultiplexer, shared by the test benches. It is written as a net list:
// row r of the tables below produces line DNET_LINE[r] with gate
// DNET_KIND[r] from the lines DNET_A..D[r] (0 = unused). Lines are numbered
// as in demux4_cut. Rows are in evaluation order. `xv` is indexed by X
// number; fl = 0 means no fault. Include it inside a module.

localparam int DMX_LINES = 31;

// gate kinds: 0 input, 1 fan-out branch, 2 NOT, 3 AND
localparam int DNET_LINE [31] = '{1, 2, 3, 4, 5, 6, 22, 23, 24, 7, 8, 27, 28, 29, 9,
                                  14, 15, 16, 17, 18, 19, 20, 21, 25, 26, 30, 31,
                                  10, 11, 12, 13};
localparam int DNET_KIND [31] = '{0, 0, 0, 0, 2, 2, 1, 1, 1, 2, 2, 1, 1, 1, 2,
                                  1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1,
                                  3, 3, 3, 3};
localparam int DNET_A    [31] = '{0, 0, 0, 0, 1, 3, 6, 6, 6, 22, 4, 8, 8, 8, 27,
                                  2, 2, 2, 2, 5, 5, 5, 5, 7, 7, 9, 9,
                                  18, 19, 20, 21};
localparam int DNET_B    [31] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  14, 15, 16, 17};
localparam int DNET_C    [31] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  23, 24, 25, 26};
localparam int DNET_D    [31] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                  28, 30, 29, 31};

function automatic logic [3:0] demux_gate_ref(logic [4:1] xv, int fl, int fs);
  logic [31:1] v;
  v = '0;
  for (int r = 0; r < 31; r++) begin
    logic g;
    case (DNET_KIND[r])
      0:       g = xv[DNET_LINE[r]];
      1:       g = v[DNET_A[r]];
      2:       g = !v[DNET_A[r]];
      default: g = v[DNET_A[r]] & v[DNET_B[r]] & v[DNET_C[r]] & v[DNET_D[r]];
    endcase
    v[DNET_LINE[r]] = (DNET_LINE[r] == fl) ? (fs != 0) : g;
  end
  return v[13:10];
endfunction
