// tb_fig14_cut: the syndrome over all 64 vectors must be 15 (15/64) and 22
// (11/32) with x1 stuck at 1; the function is checked row by row.
module tb_fig14_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [5:0]   x;
  logic         fo;
  stuck_fault_t f;

  fig14_cut u_dut (.x, .fault(f), .f(fo));

  initial begin
    int syn_good = 0, syn_bad = 0;
    for (int v = 0; v < 64; v++) begin
      logic x1, x2, x3, x4, x5, x6;
      x = 6'(v);
      {x6, x5, x4, x3, x2, x1} = x;
      f = NO_FAULT;
      #1;
      check(fo == ((x1 & !x2 & !x3) | (!x4 & x5 & x6)), $sformatf("F for %b", x));
      syn_good += int'(fo);
      f = '{en: 1'b1, sa: 1'b1, line: 5'd1};
      #1;
      check(fo == ((!x2 & !x3) | (!x4 & x5 & x6)), $sformatf("F with x1 s-a-1 for %b", x));
      syn_bad += int'(fo);
    end
    check(syn_good == 15, $sformatf("syndrome %0d/64", syn_good));
    check(syn_bad == 22, $sformatf("faulty syndrome %0d/64", syn_bad));
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
