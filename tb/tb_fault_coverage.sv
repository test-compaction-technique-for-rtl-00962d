// tb_fault_coverage: fault-coverage experiment on the BCD converter and the
// demultiplexer.  The BCD converter is tested with the first 2, 4, 64 and
// all 512 vectors of the binary count, the demultiplexer with all 16.  For
// every single stuck-at fault on the circuits' numbered lines (all 29
// lines of the gate-level BCD converter, all 31 of the demultiplexer), with modification off and on, the self-test verdict of
// mdsc_bist must match an independent model.  The run prints, per test
// length, how many faults the compacted syndrome misses and how many a
// separate ones count on every output (no space compaction) would miss.
module tb_fault_coverage;
  import mdsc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int          NB = 4;
  localparam int          BLEN [NB] = '{2, 4, 64, 512};
  localparam logic [15:0] S_SEQ = 16'b1111_1010_0000_0101;

  logic         start, mod_en;
  stuck_fault_t bf, df;
  int           bref [NB];
  int           dref;
  logic [NB-1:0] b_done, b_fault;
  logic          d_done, d_fault;

  for (genvar g = 0; g < NB; g++) begin : g_bcd
    localparam int unsigned CW = $clog2(BLEN[g] + 1);
    logic [8:0]    x;
    logic [3:0]    o;
    logic [CW-1:0] syn;
    logic          c, m, s, b;
    bcd_encoder_cut u_cut (.x, .fault(bf), .o);
    mdsc_bist #(.N_IN(9), .M(4), .LEN(BLEN[g]), .MODE(PAT_EXHAUSTIVE),
                .GATES({GATE_XOR, GATE_XOR, GATE_XOR, GATE_XOR})) u_bist (
      .clk, .rst_n, .start, .mod_en, .ref_syndrome(CW'(bref[g])),
      .cut_pattern(x), .cut_response(o), .compacted(c), .modified(m),
      .mod_bit(s), .syndrome(syn), .busy(b), .done(b_done[g]), .fault(b_fault[g]));
  end

  logic [3:0] d_x, d_o;
  logic [4:0] d_syn;
  logic       d_c, d_m, d_s, d_b;
  demux4_cut u_dcut (.x(d_x), .fault(df), .o(d_o));
  mdsc_bist #(.N_IN(4), .M(4), .LEN(16), .MODE(PAT_EXHAUSTIVE),
              .GATES({GATE_OR, GATE_OR, GATE_OR, GATE_OR})) u_dbist (
    .clk, .rst_n, .start, .mod_en, .ref_syndrome(5'(dref)),
    .cut_pattern(d_x), .cut_response(d_o), .compacted(d_c), .modified(d_m),
    .mod_bit(d_s), .syndrome(d_syn), .busy(d_b), .done(d_done), .fault(d_fault));

  function automatic logic sk(logic v, int line, int fl, int fs);
    return (line == fl) ? 1'(fs) : v;
  endfunction

  `include "bcd_gate_ref.svh"

  // BCD outputs for binary-count vector k (X1 = MSB of 9 bits).
  function automatic logic [3:0] bcd_o(int k, int fl, int fs);
    logic [9:1] x;
    for (int i = 1; i <= 9; i++) x[i] = 1'((k >> (9 - i)) & 1);
    return bcd_gate_ref(x, fl, fs);
  endfunction

  `include "demux_gate_ref.svh"

  // demultiplexer outputs for binary-count vector k (X(1) = MSB of 4 bits).
  function automatic logic [3:0] dmx_o(int k, int fl, int fs);
    return demux_gate_ref({1'(k), 1'(k >> 1), 1'(k >> 2), 1'(k >> 3)}, fl, fs);
  endfunction

  // Ones counts: [0..3] per output, [4] compacted and modified stream.
  typedef int counts_t [5];
  function automatic counts_t counts(bit is_bcd, int len, bit m, int fl, int fs);
    counts_t n = '{0, 0, 0, 0, 0};
    for (int k = 0; k < len; k++) begin
      logic [3:0] o = is_bcd ? bcd_o(k, fl, fs) : dmx_o(k, fl, fs);
      logic q = is_bcd ? ^o : |o;
      if (m) q ^= S_SEQ[15 - (k % 16)];
      for (int j = 0; j < 4; j++) n[j] += int'(o[j]);
      n[4] += int'(q);
    end
    return n;
  endfunction

  function automatic bit differs_any(counts_t a, counts_t b);
    for (int j = 0; j < 4; j++) if (a[j] != b[j]) return 1;
    return 0;
  endfunction

  task automatic run();
    int cyc = 0;
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    while (cyc < 1000) begin
      @(posedge clk);
      cyc++;
      #1;
      if (&b_done && d_done) break;
    end
    check(cyc == 512 + 1, $sformatf("longest test done after %0d edges", cyc));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int miss_before [NB+1], miss_after [2][NB+1], n_faults [NB+1];
    counts_t good_b [2][NB], good_d [2];
    start = 0; mod_en = 0; bf = NO_FAULT; df = NO_FAULT;
    for (int g = 0; g <= NB; g++) begin
      miss_before[g] = 0; miss_after[0][g] = 0; miss_after[1][g] = 0; n_faults[g] = 0;
    end
    for (int m = 0; m < 2; m++) begin
      for (int g = 0; g < NB; g++) good_b[m][g] = counts(1, BLEN[g], m[0], 0, 0);
      good_d[m] = counts(0, 16, m[0], 0, 0);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      mod_en = m[0];
      for (int g = 0; g < NB; g++) bref[g] = good_b[m][g][4];
      dref = good_d[m][4];
      bf = NO_FAULT; df = NO_FAULT;
      run();
      check(b_fault == '0 && !d_fault, "fault-free circuits pass");
      // 29 BCD lines and 31 demultiplexer lines, each stuck at 0 and at 1
      for (int i = 0; i < DMX_LINES; i++) begin
        for (int sa = 0; sa < 2; sa++) begin
          automatic int bl = (i < BCD_LINES) ? i + 1 : 0;
          automatic int dl = i + 1;
          bf = (bl > 0) ? '{en: 1'b1, sa: 1'(sa), line: 5'(bl)} : NO_FAULT;
          df = '{en: 1'b1, sa: 1'(sa), line: 5'(dl)};
          run();
          if (bl > 0) for (int g = 0; g < NB; g++) begin
            automatic counts_t fc = counts(1, BLEN[g], m[0], bl, sa);
            automatic bit exp_det = (fc[4] != good_b[m][g][4]);
            check(b_fault[g] == exp_det, $sformatf("BCD L=%0d line %0d s-a-%0d mod %0d", BLEN[g], bl, sa, m));
            if (!b_fault[g]) miss_after[m][g]++;
            if (m == 0) begin
              n_faults[g]++;
              if (!differs_any(fc, good_b[0][g])) miss_before[g]++;
            end
          end
          begin
            automatic counts_t fc = counts(0, 16, m[0], dl, sa);
            check(d_fault == (fc[4] != good_d[m][4]), $sformatf("demux line %0d s-a-%0d mod %0d", dl, sa, m));
            if (!d_fault) miss_after[m][NB]++;
            if (m == 0) begin
              n_faults[NB]++;
              if (!differs_any(fc, good_d[0])) miss_before[NB]++;
            end
          end
        end
      end
    end
    for (int g = 0; g <= NB; g++)
      $display("%s L=%0d: faults %0d, missed per-output %0d, missed compacted %0d (modified %0d)",
               g < NB ? "BCD  " : "DEMUX", g < NB ? BLEN[g] : 16, n_faults[g],
               miss_before[g], miss_after[0][g], miss_after[1][g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
