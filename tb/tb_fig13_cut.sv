// tb_fig13_cut: the syndrome (ones over all 8 vectors) must be 2, i.e. 1/4,
// and stay 2 with x1 stuck at 1 although the function changes (the fault
// is syndrome-masked); the function itself is checked row by row.
module tb_fig13_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [2:0]   x;
  logic         fo;
  stuck_fault_t f;

  fig13_cut u_dut (.x, .fault(f), .f(fo));

  initial begin
    int syn_good = 0, syn_bad = 0, diff = 0;
    for (int v = 0; v < 8; v++) begin
      logic x1, x2, x3, good;
      x = 3'(v);
      {x3, x2, x1} = x;
      f = NO_FAULT;
      #1 good = fo;
      check(good == ((x1 & !x2 & !x3) | (!x1 & x2 & x3)), $sformatf("F for %b", x));
      syn_good += int'(good);
      f = '{en: 1'b1, sa: 1'b1, line: 5'd1};
      #1;
      check(fo == (!x2 & !x3), $sformatf("F with x1 s-a-1 for %b", x));
      syn_bad += int'(fo);
      if (fo != good) diff++;
    end
    check(syn_good == 2, $sformatf("syndrome %0d/8", syn_good));
    check(syn_bad == 2, $sformatf("faulty syndrome %0d/8", syn_bad));
    check(diff > 0, "the fault changes the function");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
