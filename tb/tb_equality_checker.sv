// tb_equality_checker: the verdict must be sampled only on `check`, flag a
// fault exactly when syndrome and reference differ, hold until clear.
module tb_equality_checker;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clear, chk, done, fault;
  logic [6:0] syn, rsyn;

  equality_checker #(.W(7)) u_dut (
    .clk, .rst_n, .clear, .check(chk), .syndrome(syn), .ref_syn(rsyn), .done, .fault);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; chk = 0; syn = 0; rsyn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!done && !fault, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      logic exp_f;
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(!done && !fault, "cleared");
      rsyn = 7'($urandom);
      syn  = (i % 2 == 0) ? rsyn : 7'($urandom);
      exp_f = (syn != rsyn);
      @(negedge clk);
      check(!done, "no verdict before check");
      chk = 1;
      @(negedge clk);
      chk = 0;
      check(done && fault == exp_f, $sformatf("verdict %0d vs %0d", syn, rsyn));
      syn = ~syn;
      @(negedge clk);
      check(done && fault == exp_f, "verdict holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
