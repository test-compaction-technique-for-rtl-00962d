// syndrome_counter: the time compressor.
//
// Counts the ones in the (compacted, modified) response stream: on each
// clock with `en` high the count grows by `d`.  The final count is the
// syndrome, the circuit's signature; it does not depend on the order of the
// test vectors.  W must hold the test length (W >= clog2(LEN+1)), so the
// count cannot wrap.  `clear` (synchronous) starts a new test and has
// priority over `en`.
module syndrome_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         d,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (clear)    count <= '0;
    else if (en && d)  count <= count + 1'b1;
  end
endmodule
