// equality_checker: compares the syndrome with the reference syndrome.
//
// On a `check` strobe it samples `syndrome != ref_syn` into `fault` and
// sets `done`; both hold until `clear`.  A fault-free circuit must give the
// reference count; a different count marks the circuit as faulty, while an
// equal count leaves it unproven (the fault may be masked).  `ref_syn` is
// the stored fault-free syndrome, supplied from outside.  Registering the
// verdict is this design's choice.
module equality_checker #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         check,
  input  logic [W-1:0] syndrome,
  input  logic [W-1:0] ref_syn,
  output logic         done,
  output logic         fault
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      fault <= 1'b0;
    end else if (clear) begin
      done  <= 1'b0;
      fault <= 1'b0;
    end else if (check) begin
      done  <= 1'b1;
      fault <= (syndrome != ref_syn);
    end
  end
endmodule
