// tb_test_pattern_gen: checks both vector orders of test_pattern_gen.
// Decimal order (9 inputs, 10 vectors) must give the all-zero code then
// X1..X9 one at a time; exhaustive order (4 inputs, 16 vectors) the binary
// count with X(1) as MSB; a truncated exhaustive run (9 inputs, 64 vectors)
// the first 64 counts.  Also checks valid/last/busy timing and that start
// is ignored while a run is in progress.
module tb_test_pattern_gen;
  import mdsc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       st_d, st_e, st_t;
  logic [8:0] pat_d, pat_t;
  logic [3:0] pat_e;
  logic       v_d, l_d, b_d, v_e, l_e, b_e, v_t, l_t, b_t;

  test_pattern_gen #(.N_IN(9), .LEN(10), .MODE(PAT_DECIMAL)) u_dec (
    .clk, .rst_n, .start(st_d), .pattern(pat_d), .valid(v_d), .last(l_d), .busy(b_d));
  test_pattern_gen #(.N_IN(4), .LEN(16), .MODE(PAT_EXHAUSTIVE)) u_exh (
    .clk, .rst_n, .start(st_e), .pattern(pat_e), .valid(v_e), .last(l_e), .busy(b_e));
  test_pattern_gen #(.N_IN(9), .LEN(64), .MODE(PAT_EXHAUSTIVE)) u_trn (
    .clk, .rst_n, .start(st_t), .pattern(pat_t), .valid(v_t), .last(l_t), .busy(b_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected vector k, X(1) first, written out as a bit string per input.
  function automatic logic [8:0] exp_dec(int k);
    logic [8:0] p = '0;
    if (k > 0) p[k-1] = 1'b1;
    return p;
  endfunction
  function automatic logic [8:0] exp_bin(int k, int n);
    logic [8:0] p = '0;
    for (int i = 0; i < n; i++) p[i] = (k >> (n - 1 - i)) & 1;
    return p;
  endfunction

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_d = 0; st_e = 0; st_t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!v_d && !b_d && !l_d, "idle after reset");
    st_d = 1; st_e = 1; st_t = 1;
    @(negedge clk);
    st_d = 0; st_e = 0; st_t = 0;
    for (int k = 0; k < 64; k++) begin
      if (k < 10) begin
        check(v_d && b_d, $sformatf("decimal valid at %0d", k));
        check(pat_d == exp_dec(k), $sformatf("decimal vector %0d = %b", k, pat_d));
        check(l_d == (k == 9), $sformatf("decimal last at %0d", k));
      end else begin
        check(!v_d && !l_d, $sformatf("decimal idle at %0d", k));
      end
      if (k < 16) begin
        check(pat_e == exp_bin(k, 4)[3:0], $sformatf("exhaustive vector %0d = %b", k, pat_e));
        check(l_e == (k == 15) && v_e, $sformatf("exhaustive last at %0d", k));
      end
      check(v_t && pat_t == exp_bin(k, 9), $sformatf("truncated vector %0d = %b", k, pat_t));
      check(l_t == (k == 63), $sformatf("truncated last at %0d", k));
      if (k == 3) st_t = 1;   // start while busy must be ignored
      @(negedge clk);
      st_t = 0;
    end
    check(!v_t && !b_t, "truncated run ended after 64 vectors");
    // restart the decimal generator
    st_d = 1;
    @(negedge clk);
    st_d = 0;
    check(v_d && pat_d == 9'd0, "decimal restart from vector 0");
    @(negedge clk);
    check(pat_d == 9'b000000001, "decimal restart vector 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
