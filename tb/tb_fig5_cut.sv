// tb_fig5_cut: checks the function over all 32 vectors and then, by
// injecting stuck-at faults on every non-output line and watching which
// outputs ever change, counts the lines on which only O1 depends (L1), only
// O2 (L2) and both (L12).  They must be 2, 3 and 3, which give
// alpha = L1 + L2 + L12 = 8 and beta = L12 / 2 = 3/2, S1 = 16/19.
module tb_fig5_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [4:0]   x;
  logic [1:0]   o;
  stuck_fault_t f;

  fig5_cut u_dut (.x, .fault(f), .o);

  initial begin
    int l1, l2, l12;
    f = NO_FAULT;
    for (int v = 0; v < 32; v++) begin
      logic x1, x2, x3, x4, x5;
      x = 5'(v);
      {x5, x4, x3, x2, x1} = x;
      #1;
      check(o[0] == (x1 & x2 & x3), $sformatf("O1 for %b", x));
      check(o[1] == (x2 & x3 & x4 & x5), $sformatf("O2 for %b", x));
    end
    l1 = 0; l2 = 0; l12 = 0;
    for (int line = 1; line <= 8; line++) begin
      automatic bit d1 = 0, d2 = 0;
      for (int sa = 0; sa < 2; sa++) begin
        for (int v = 0; v < 32; v++) begin
          logic [1:0] good;
          x = 5'(v);
          f = NO_FAULT;
          #1 good = o;
          f = '{en: 1'b1, sa: 1'(sa), line: 5'(line)};
          #1;
          if (o[0] != good[0]) d1 = 1;
          if (o[1] != good[1]) d2 = 1;
        end
      end
      if (d1 && d2) l12++;
      else if (d1) l1++;
      else if (d2) l2++;
    end
    check(l1 == 2, $sformatf("L1 = %0d", l1));
    check(l2 == 3, $sformatf("L2 = %0d", l2));
    check(l12 == 3, $sformatf("L12 = %0d", l12));
    check(2 * (l1 + l2 + l12) == 16 && l12 == 3, "alpha = 8, beta = 3/2");
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
