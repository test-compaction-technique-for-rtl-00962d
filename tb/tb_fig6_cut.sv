// tb_fig6_cut: checks O1 = X1 X2 + X2' X3' and O2 = X4 X5 X2' X3' over all
// 32 vectors, that line 7 is observable at both outputs, lines 4, 5, 8
// only at O2 and lines 1, 6 only at O1 (fault injection), and that the
// output weights are 16 and 2.
module tb_fig6_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [4:0]   x;
  logic [1:0]   o;
  stuck_fault_t f;

  fig6_cut u_dut (.x, .fault(f), .o);

  // Which outputs a stuck-at fault on `line` can ever change: bit0 O1, bit1 O2.
  function automatic logic [1:0] reach(int line);
    case (line)
      1, 6:    return 2'b01;
      4, 5, 8: return 2'b10;
      default: return 2'b11;   // 2, 3, 7
    endcase
  endfunction

  initial begin
    int w1 = 0, w2 = 0;
    f = NO_FAULT;
    for (int v = 0; v < 32; v++) begin
      logic x1, x2, x3, x4, x5;
      x = 5'(v);
      {x5, x4, x3, x2, x1} = x;
      #1;
      check(o[0] == ((x1 & x2) | (!x2 & !x3)), $sformatf("O1 for %b", x));
      check(o[1] == (x4 & x5 & !x2 & !x3), $sformatf("O2 for %b", x));
      w1 += int'(o[0]);
      w2 += int'(o[1]);
    end
    check(w1 == 16 && w2 == 2, $sformatf("weights %0d %0d", w1, w2));
    for (int line = 1; line <= 8; line++) begin
      automatic logic [1:0] seen = 2'b00;
      for (int sa = 0; sa < 2; sa++) begin
        for (int v = 0; v < 32; v++) begin
          logic [1:0] good;
          x = 5'(v);
          f = NO_FAULT;
          #1 good = o;
          f = '{en: 1'b1, sa: 1'(sa), line: 5'(line)};
          #1 seen |= (o ^ good);
        end
      end
      check(seen == reach(line), $sformatf("line %0d reaches %b", line, seen));
    end
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
