// tb_bcd_encoder_cut: over the ten decimal codes the outputs must follow the
// sequences 155h, 0CCh, 03Ch, 003h (weights 5, 4, 4, 2). Over all 512 input
// vectors the fault-free outputs must be the OR sums of the BCD weights. For
// each of the 58 single stuck-at faults (29 lines), all 512 vectors are
// compared with the net-list reference model in bcd_gate_ref.svh, and the
// fault must change the outputs for at least one vector (the circuit has no
// redundant line). From the same runs the bench counts, for the output pair
// O1/O2, the lines whose faults reach only O1 (L1), only O2 (L2) or both
// (L12). The tree-selection example for this circuit uses S1 = 0.91 and
// S2 = 0.09, which needs L1 = 10, L2 = 6, L12 = 4: alpha = 20, beta = 2,
// S1 = 20/22. For O3/O4 the bench expects 10, 5 and 0.
module tb_bcd_encoder_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "bcd_gate_ref.svh"

  logic [8:0]   x;
  logic [3:0]   o;
  stuck_fault_t f;
  logic [3:0]   reach [1:29];   // outputs each line's faults can change

  bcd_encoder_cut u_dut (.x, .fault(f), .o);

  localparam logic [9:0] SEQ [4] = '{10'h155, 10'h0CC, 10'h03C, 10'h003};

  // Function: output k is 1 if any active input's digit has bit k set.
  function automatic logic [3:0] bcd_sum(logic [8:0] v);
    logic [3:0] r = '0;
    for (int d = 1; d <= 9; d++) if (v[d-1]) r |= 4'(d);
    return r;
  endfunction

  initial begin
    int w [4];
    int n_faults;
    f = NO_FAULT;
    w = '{0, 0, 0, 0};
    for (int d = 0; d <= 9; d++) begin
      x = (d == 0) ? 9'd0 : 9'(1 << (d - 1));
      #1;
      for (int k = 0; k < 4; k++) begin
        check(o[k] == SEQ[k][9-d], $sformatf("O%0d at digit %0d", k + 1, d));
        w[k] += int'(o[k]);
      end
      check(o == 4'(d), $sformatf("BCD of digit %0d", d));
    end
    check(w[0] == 5 && w[1] == 4 && w[2] == 4 && w[3] == 2, "output weights 5 4 4 2");
    for (int v = 0; v < 512; v++) begin
      x = 9'(v);
      #1;
      check(o == bcd_sum(x), $sformatf("exhaustive %b", x));
      check(bcd_gate_ref(x, 0, 0) == bcd_sum(x), $sformatf("reference model %b", x));
    end
    n_faults = 0;
    for (int line = 1; line <= BCD_LINES; line++) begin
      reach[line] = '0;
      for (int sa = 0; sa < 2; sa++) begin
        automatic bit seen = 0;
        automatic int bad = 0;
        f = '{en: 1'b1, sa: 1'(sa), line: 5'(line)};
        for (int v = 0; v < 512; v++) begin
          x = 9'(v);
          #1;
          if (o != bcd_gate_ref(x, line, sa)) bad++;
          if (o != bcd_sum(x)) seen = 1;
          reach[line] |= o ^ bcd_sum(x);
        end
        check(bad == 0, $sformatf("line %0d s-a-%0d: %0d vectors differ from the model", line, sa, bad));
        check(seen, $sformatf("line %0d s-a-%0d changes the outputs", line, sa));
        n_faults++;
      end
    end
    check(n_faults == 58, "58 single stuck-at faults");
    for (int p = 0; p < 2; p++) begin
      automatic int a = 2 * p, b = 2 * p + 1;
      automatic int l1 = 0, l2 = 0, l12 = 0;
      for (int line = 1; line <= BCD_LINES; line++) begin
        if (reach[line][a] && !reach[line][b]) l1++;
        if (reach[line][b] && !reach[line][a]) l2++;
        if (reach[line][a] && reach[line][b]) l12++;
      end
      $display("O%0d/O%0d: L1 = %0d, L2 = %0d, L12 = %0d", a + 1, b + 1, l1, l2, l12);
      if (p == 0) check(l1 == 10 && l2 == 6 && l12 == 4, "O1/O2 line counts 10, 6, 4");
      else        check(l1 == 10 && l2 == 5 && l12 == 0, "O3/O4 line counts 10, 5, 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
