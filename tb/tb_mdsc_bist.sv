// tb_mdsc_bist: runs complete self-tests of the BCD converter (ten decimal
// codes, EXOR tree) and of the demultiplexer (16 exhaustive vectors, OR
// tree) through mdsc_bist, with output modification off and on, fault-free
// and with every stuck-at fault on the circuits' numbered lines (all 29
// lines of the gate-level BCD converter, all 31 of the demultiplexer).  The
// expected syndrome of each run is computed here from a separate model of
// circuit, tree, modifier sequence and ones count; the verdict must be
// "fault" exactly when that syndrome differs from the fault-free one.
// Also checks that done rises LEN + 1 cycles after the start edge and that
// the fault-free BCD syndrome without modification is 5 (O5 ^ O6 =
// 0110100110) and the demultiplexer's is 4.
module tb_mdsc_bist;
  import mdsc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [15:0] S_SEQ = 16'b1111_1010_0000_0101;

  logic start, mod_en;

  // BCD converter under MDSC
  logic [8:0]   b_x;
  logic [3:0]   b_o, b_ref, b_syn;
  logic         b_c, b_m, b_s, b_busy, b_done, b_fault;
  stuck_fault_t b_f;
  bcd_encoder_cut u_bcd (.x(b_x), .fault(b_f), .o(b_o));
  mdsc_bist #(.N_IN(9), .M(4), .LEN(10), .MODE(PAT_DECIMAL),
              .GATES({GATE_XOR, GATE_XOR, GATE_XOR, GATE_XOR})) u_b (
    .clk, .rst_n, .start, .mod_en, .ref_syndrome(b_ref),
    .cut_pattern(b_x), .cut_response(b_o), .compacted(b_c), .modified(b_m),
    .mod_bit(b_s), .syndrome(b_syn), .busy(b_busy), .done(b_done), .fault(b_fault));

  // demultiplexer under MDSC
  logic [3:0]   d_x, d_o;
  logic [4:0]   d_ref, d_syn;
  logic         d_c, d_m, d_s, d_busy, d_done, d_fault;
  stuck_fault_t d_f;
  demux4_cut u_dmx (.x(d_x), .fault(d_f), .o(d_o));
  mdsc_bist #(.N_IN(4), .M(4), .LEN(16), .MODE(PAT_EXHAUSTIVE),
              .GATES({GATE_OR, GATE_OR, GATE_OR, GATE_OR})) u_d (
    .clk, .rst_n, .start, .mod_en, .ref_syndrome(d_ref),
    .cut_pattern(d_x), .cut_response(d_o), .compacted(d_c), .modified(d_m),
    .mod_bit(d_s), .syndrome(d_syn), .busy(d_busy), .done(d_done), .fault(d_fault));

  // ---- reference models ---------------------------------------------------
  function automatic logic stuck(logic v, int line, int fl, int fs);
    return (line == fl) ? 1'(fs) : v;
  endfunction

  `include "bcd_gate_ref.svh"

  // BCD: digit code k (0..9), fault (line fl, value fs; fl = 0 none).
  function automatic int bcd_syndrome(bit m, int fl, int fs);
    int n = 0;
    for (int k = 0; k < 10; k++) begin
      logic [9:1] xi;
      logic [3:0] o;
      logic q;
      for (int i = 1; i <= 9; i++) xi[i] = 1'(i == k);
      o = bcd_gate_ref(xi, fl, fs);
      q = (o[0] ^ o[1]) ^ (o[2] ^ o[3]);
      if (m) q ^= S_SEQ[15 - (k % 16)];
      n += int'(q);
    end
    return n;
  endfunction

  `include "demux_gate_ref.svh"

  // demultiplexer: binary count r (X(1) = MSB), fault (line fl, value fs).
  function automatic int dmx_syndrome(bit m, int fl, int fs);
    int n = 0;
    for (int r = 0; r < 16; r++) begin
      logic [3:0] o = demux_gate_ref({1'(r), 1'(r >> 1), 1'(r >> 2), 1'(r >> 3)}, fl, fs);
      logic q = (o[0] | o[1]) | (o[2] | o[3]);
      if (m) q ^= S_SEQ[15 - (r % 16)];
      n += int'(q);
    end
    return n;
  endfunction

  // ---- one test of both circuits ------------------------------------------
  task automatic run_test(output int b_cycles, output int d_cycles);
    int cyc = 0;
    b_cycles = -1; d_cycles = -1;
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    while ((b_cycles < 0 || d_cycles < 0) && cyc < 100) begin
      @(posedge clk);
      cyc++;
      #1;
      if (b_done && b_cycles < 0) b_cycles = cyc;
      if (d_done && d_cycles < 0) d_cycles = cyc;
    end
  endtask

  int n_detect = 0, n_masked = 0;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bc, dc;
    start = 0; mod_en = 0; b_f = NO_FAULT; d_f = NO_FAULT; b_ref = '0; d_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(bcd_syndrome(0, 0, 0) == 5, "model: BCD syndrome 5");
    check(dmx_syndrome(0, 0, 0) == 4, "model: demux syndrome 4");
    for (int m = 0; m < 2; m++) begin
      automatic int b_good = bcd_syndrome(m[0], 0, 0);
      automatic int d_good = dmx_syndrome(m[0], 0, 0);
      mod_en = m[0];
      b_ref = 4'(b_good);
      d_ref = 5'(d_good);
      // fault-free
      b_f = NO_FAULT; d_f = NO_FAULT;
      run_test(bc, dc);
      check(bc == 10 + 1, $sformatf("BCD done after %0d cycles", bc));
      check(dc == 16 + 1, $sformatf("demux done after %0d cycles", dc));
      check(int'(b_syn) == b_good && !b_fault, $sformatf("BCD fault-free syndrome %0d (mod %0d)", b_syn, m));
      check(int'(d_syn) == d_good && !d_fault, $sformatf("demux fault-free syndrome %0d (mod %0d)", d_syn, m));
      // faults: BCD lines 1..29 and demux lines 1..31, run together
      for (int i = 0; i < DMX_LINES; i++) begin
        for (int sa = 0; sa < 2; sa++) begin
          automatic int bl = (i < BCD_LINES) ? i + 1 : 0;
          automatic int dl = i + 1;
          automatic int be = bcd_syndrome(m[0], bl, sa);
          automatic int de = dmx_syndrome(m[0], dl, sa);
          b_f = (bl > 0) ? '{en: 1'b1, sa: 1'(sa), line: 5'(bl)} : NO_FAULT;
          d_f = '{en: 1'b1, sa: 1'(sa), line: 5'(dl)};
          run_test(bc, dc);
          if (bl > 0) begin
            check(int'(b_syn) == be, $sformatf("BCD line %0d s-a-%0d syndrome %0d vs %0d", bl, sa, b_syn, be));
            check(b_fault == (be != b_good), $sformatf("BCD line %0d s-a-%0d verdict", bl, sa));
            if (b_fault) n_detect++; else n_masked++;
          end
          check(int'(d_syn) == de, $sformatf("demux line %0d s-a-%0d syndrome %0d vs %0d", dl, sa, d_syn, de));
          check(d_fault == (de != d_good), $sformatf("demux line %0d s-a-%0d verdict", dl, sa));
          if (d_fault) n_detect++; else n_masked++;
        end
      end
    end
    $display("faults detected %0d, masked %0d", n_detect, n_masked);
    check(n_detect > 0, "some fault detected");
    check(n_masked > 0, "some fault masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
