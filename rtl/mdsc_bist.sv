// mdsc_bist: one complete MDSC built-in self-test around an external
// circuit under test (CUT).
//
// Chain: test_pattern_gen -> CUT (outside, via cut_pattern / cut_response)
// -> compaction_tree (M lines to 1) -> output_modifier -> syndrome_counter
// -> equality_checker against `ref_syndrome`.  For M = 1 the tree is left
// out.  The tree, the modifier and the ones-counting signature follow the
// method; the start/done sequencing is this design's choice.
//
// Timing: a one-cycle `start` (ignored while busy) clears the counter, the
// verdict and the modifier sequence.  The LEN vectors then go out on
// consecutive cycles; the CUT and the tree are combinational, so each
// vector's compacted bit is counted on the clock edge that ends its cycle.
// One cycle after the last vector the checker samples; `done` and `fault`
// rise on the (LEN + 1)th clock edge after the start edge and hold until the next start.
// `mod_en` must be stable during a test; the reference must match it.
module mdsc_bist
  import mdsc_pkg::*;
#(
  parameter int unsigned        N_IN    = 9,
  parameter int unsigned        M       = 4,
  parameter int unsigned        LEN     = 10,
  parameter pattern_mode_e      MODE    = PAT_DECIMAL,
  parameter logic [2*M-1:0]    GATES   = {M{GATE_XOR}},
  parameter int unsigned        SEQ_LEN = 16,
  parameter logic [SEQ_LEN-1:0] SEQ     = 16'b1111_1010_0000_0101,
  localparam int unsigned       CW      = $clog2(LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            mod_en,
  input  logic [CW-1:0]   ref_syndrome,
  output logic [N_IN-1:0] cut_pattern,
  input  logic [M-1:0]    cut_response,
  output logic            compacted,
  output logic            modified,
  output logic            mod_bit,
  output logic [CW-1:0]   syndrome,
  output logic            busy,
  output logic            done,
  output logic            fault
);
  logic valid, last, last_q, go;

  assign go = start && !busy;

  test_pattern_gen #(.N_IN(N_IN), .LEN(LEN), .MODE(MODE)) u_tpg (
    .clk, .rst_n, .start(go), .pattern(cut_pattern), .valid, .last, .busy
  );

  if (M > 1) begin : g_tree
    compaction_tree #(.M(M), .GATES(GATES)) u_tree (
      .resp(cut_response), .nodes(), .out(compacted)
    );
  end else begin : g_single
    assign compacted = cut_response[0];
  end

  output_modifier #(.SEQ_LEN(SEQ_LEN), .SEQ(SEQ)) u_mod (
    .clk, .rst_n, .restart(go), .advance(valid), .en(mod_en),
    .q(compacted), .s(mod_bit), .q_mod(modified)
  );

  syndrome_counter #(.W(CW)) u_cnt (
    .clk, .rst_n, .clear(go), .en(valid), .d(modified), .count(syndrome)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= 1'b0;
    else        last_q <= last;
  end

  equality_checker #(.W(CW)) u_chk (
    .clk, .rst_n, .clear(go), .check(last_q),
    .syndrome, .ref_syn(ref_syndrome), .done, .fault
  );

endmodule
