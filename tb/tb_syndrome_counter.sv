// tb_syndrome_counter: random bit streams with random enables; the count
// must equal the number of enabled ones, and clear must restart it.
module tb_syndrome_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clear, en, d;
  logic [9:0] count;

  syndrome_counter #(.W(10)) u_dut (.clk, .rst_n, .clear, .en, .d, .count);

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    clear = 0; en = 0; d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0, "zero after reset");
    for (int run = 0; run < 8; run++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(count == 0, "zero after clear");
      expected = 0;
      for (int i = 0; i < 512; i++) begin
        en = 1'($urandom_range(0, 3) != 0);
        d  = 1'($urandom_range(0, run) != 0);
        if (en && d) expected++;
        @(negedge clk);
        if (i % 64 == 63) check(int'(count) == expected, $sformatf("run %0d count %0d vs %0d", run, count, expected));
      end
      en = 0;
      @(negedge clk);
      check(int'(count) == expected, "count holds while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
