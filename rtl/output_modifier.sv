// output_modifier: output data modification ahead of the syndrome counter.
//
// The compacted response bit Q is combined with a modifier sequence S,
// Q' = Q xor S, so that the ones count of Q' lies further from n/2, where
// the ones-count signature has its largest deception volume (number of
// error streams that alias to the same count).  S is produced here by a
// ring register of SEQ_LEN bits loaded with SEQ on `restart`; each `advance`
// (one per test vector) rotates it by one bit; the MSB of SEQ is applied to
// the first vector.  The default SEQ, 1111_1010_0000_0101, is the modifier
// that turns the 32-bit example stream Q = D385_96C1h (15 ones) into
// Q' = 2980_6CC4h (11 ones); it repeats with period 16.  `en` = 0 switches
// the modification off (Q' = Q).  The ring-register source of S is this
// design's choice; the method only requires a fixed, known S.
// Q' is combinational in Q; S changes on the clock edge that `advance` is
// high at.
module output_modifier #(
  parameter int unsigned          SEQ_LEN = 16,
  parameter logic [SEQ_LEN-1:0]   SEQ     = 16'b1111_1010_0000_0101
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic advance,
  input  logic en,
  input  logic q,
  output logic s,
  output logic q_mod
);
  logic [SEQ_LEN-1:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ring <= SEQ;
    else if (restart) ring <= SEQ;
    else if (advance) ring <= {ring[SEQ_LEN-2:0], ring[SEQ_LEN-1]};
  end

  assign s     = ring[SEQ_LEN-1];
  assign q_mod = q ^ (en & s);

  initial assert (SEQ_LEN >= 2) else $error("SEQ_LEN must be at least 2");

endmodule
