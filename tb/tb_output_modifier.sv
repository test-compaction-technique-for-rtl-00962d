// tb_output_modifier: feeds the 32-bit example stream Q = D385_96C1h (15
// ones) through the modifier and checks that it yields Q' = 2980_6CC4h (11
// ones), bit by bit, with S repeating after 16 bits.  Then checks that
// en = 0 passes Q unchanged and that restart reloads the sequence.
module tb_output_modifier;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic restart, advance, en, q, s, q_mod;

  output_modifier u_dut (.clk, .rst_n, .restart, .advance, .en, .q, .s, .q_mod);

  localparam logic [31:0] Q_EX  = 32'b1101_0011_1000_0101_1001_0110_1100_0001;
  localparam logic [31:0] QM_EX = 32'b0010_1001_1000_0000_0110_1100_1100_0100;

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones_q, ones_qm;
    logic [31:0] got;
    restart = 0; advance = 0; en = 1; q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    ones_q = 0; ones_qm = 0;
    for (int i = 31; i >= 0; i--) begin
      q = Q_EX[i];
      advance = 1;
      #1;
      got[i] = q_mod;
      check(q_mod == QM_EX[i], $sformatf("Q' bit %0d", 31 - i));
      ones_q  += int'(q);
      ones_qm += int'(q_mod);
      @(negedge clk);
    end
    advance = 0;
    check(ones_q == 15, "weight of Q is 15");
    check(ones_qm == 11, $sformatf("weight of Q' is 11 (got %0d)", ones_qm));
    check(got == QM_EX, $sformatf("Q' = %h", got));
    // modification off
    en = 0;
    for (int i = 0; i < 8; i++) begin
      q = 1'(i & 1);
      advance = 1;
      #1;
      check(q_mod == q, "en = 0 passes Q");
      @(negedge clk);
    end
    // restart: S starts again with 1111_1010...
    en = 1; advance = 0; restart = 1;
    @(negedge clk);
    restart = 0;
    q = 0;
    for (int i = 0; i < 8; i++) begin
      advance = 1;
      #1;
      check(s == 1'(8'b1111_1010 >> (7 - i)), $sformatf("S bit %0d after restart", i));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
