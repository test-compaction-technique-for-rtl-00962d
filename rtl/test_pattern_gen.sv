// test_pattern_gen: the test generator of the BIST loop.
//
// After a one-cycle `start` pulse it drives LEN test vectors, one per clock,
// on `pattern` with `valid` high, and flags the final one with `last`.  Two
// orders are available:
//   PAT_EXHAUSTIVE - a binary count 0, 1, 2, ... with X(1) as the most
//                    significant bit, as in the demultiplexer truth table;
//                    LEN = 2**N_IN gives the exhaustive test of the fault
//                    simulations, a smaller LEN the first LEN vectors.
//   PAT_DECIMAL    - the all-zero vector followed by X(1), X(2), ... set one
//                    at a time, the ten decimal input codes of the BCD
//                    converter example (LEN <= N_IN + 1).
// pattern[i] drives input X(i+1).  Both orders come from the truth tables
// the method is illustrated with; the counter implementation, the start /
// last handshake and ignoring `start` while busy are this design's choices.
// Timing: `start` at edge k gives vector 0 in the cycle after edge k, vector
// LEN-1 (with `last`) LEN-1 cycles later.
module test_pattern_gen
  import mdsc_pkg::*;
#(
  parameter int unsigned   N_IN = 9,
  parameter int unsigned   LEN  = 10,
  parameter pattern_mode_e MODE = PAT_DECIMAL
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [N_IN-1:0] pattern,
  output logic            valid,
  output logic            last,
  output logic            busy
);
  localparam int unsigned IW = (LEN > 1) ? $clog2(LEN) : 1;

  logic [IW-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        idx  <= '0;
      end
    end else if (idx == IW'(LEN - 1)) begin
      busy <= 1'b0;
    end else begin
      idx <= idx + 1'b1;
    end
  end

  always_comb begin
    pattern = '0;
    if (MODE == PAT_EXHAUSTIVE) begin
      for (int i = 0; i < int'(N_IN); i++)
        if (N_IN - 1 - i < IW) pattern[i] = idx[N_IN-1-i];
    end else begin
      for (int i = 0; i < int'(N_IN); i++)
        pattern[i] = (int'(idx) == i + 1);
    end
  end

  assign valid = busy;
  assign last  = busy && (idx == IW'(LEN - 1));

  initial begin
    assert (LEN >= 1) else $error("LEN must be at least 1");
    assert (MODE == PAT_EXHAUSTIVE || LEN <= N_IN + 1)
      else $error("decimal order has at most N_IN+1 vectors");
  end

endmodule
