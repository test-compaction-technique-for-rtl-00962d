// tb_mdsc_bist_top: end-to-end test of mdsc_bist_top at its default
// parameters.  All six self-tests are started together, fault-free and
// then with every single stuck-at fault on every numbered line of every
// circuit, with output modification off and on.  Each expected syndrome is
// computed here from an independent model: circuit equations (for the
// BCD converter and the demultiplexer the net lists in bcd_gate_ref.svh
// and demux_gate_ref.svh), compaction gates, modifier sequence and ones
// count.  Checked per run: the syndrome,
// the fault verdict, and that done rises on the (LEN+1)th clock edge after
// start.  Also checked: the known fault-free syndromes without modification
// (BCD 5, demultiplexer 4, F13 2/8, F14 15/64), that x1 stuck-at-1 is
// masked in F13 but detected in F14, and that a start while busy is
// ignored.  Each mechanism must occur at least once: detection, masking,
// modification on and off, ignored restart.
module tb_mdsc_bist_top;
  import mdsc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic                start, mod_en;
  logic [SW-1:0]       ref_syndrome [N_CUT];
  stuck_fault_t        fault        [N_CUT];
  logic [SW-1:0]       syndrome     [N_CUT];
  logic [N_CUT-1:0]    busy, done, fault_ind, compacted, modified, mod_seq;

  mdsc_bist_top u_dut (
    .clk, .rst_n, .start, .mod_en, .ref_syndrome, .fault, .syndrome,
    .busy, .done, .fault_ind, .compacted, .modified, .mod_seq);

  localparam logic [15:0] S_SEQ = 16'b1111_1010_0000_0101;
  localparam int LEN   [N_CUT] = '{10, 16, 32, 32, 8, 64};
  localparam int NIN   [N_CUT] = '{9, 4, 5, 5, 3, 6};
  localparam string NAME [N_CUT] = '{"BCD", "DMX", "F5", "F6", "F13", "F14"};

  `include "bcd_gate_ref.svh"
  `include "demux_gate_ref.svh"

  // Numbered lines of each circuit that can carry a fault.
  function automatic bit is_line(int c, int l);
    case (c)
      CUT_BCD: return l >= 1 && l <= BCD_LINES;
      CUT_DMX: return l >= 1 && l <= DMX_LINES;
      CUT_F5, CUT_F6: return l >= 1 && l <= 10;
      CUT_F13: return l >= 1 && l <= 4;
      default: return l >= 1 && l <= 7;
    endcase
  endfunction

  function automatic logic sk(logic v, int line, int fl, int fs);
    return (line == fl) ? 1'(fs) : v;
  endfunction

  // Compacted bit of circuit c for vector k with fault (fl, fs), fl = 0: none.
  function automatic logic model_q(int c, int k, int fl, int fs);
    logic [19:1] x;
    logic [19:1] l;
    // input vector: decimal order for the BCD converter, else binary count
    // with X(1) as the most significant bit
    x = '0;
    if (c == CUT_BCD) begin
      if (k > 0) x[k] = 1'b1;
    end else begin
      for (int i = 1; i <= NIN[c]; i++) x[i] = 1'((k >> (NIN[c] - i)) & 1);
    end
    for (int i = 1; i <= NIN[c]; i++) l[i] = sk(x[i], i, fl, fs);
    case (c)
      CUT_BCD: begin
        logic [3:0] o = bcd_gate_ref(x[9:1], fl, fs);
        return (o[0] ^ o[1]) ^ (o[2] ^ o[3]);
      end
      CUT_DMX: begin
        logic [3:0] o = demux_gate_ref(x[4:1], fl, fs);
        return (o[0] | o[1]) | (o[2] | o[3]);
      end
      CUT_F5: begin
        l[6]  = sk(l[1] & l[2], 6, fl, fs);
        l[7]  = sk(l[2] & l[3], 7, fl, fs);
        l[8]  = sk(l[4] & l[5], 8, fl, fs);
        l[9]  = sk(l[6] & l[7], 9, fl, fs);
        l[10] = sk(l[7] & l[8], 10, fl, fs);
        return l[9] | l[10];
      end
      CUT_F6: begin
        l[6]  = sk(l[1] & l[2], 6, fl, fs);
        l[7]  = sk(!(l[2] | l[3]), 7, fl, fs);
        l[8]  = sk(l[4] & l[5], 8, fl, fs);
        l[9]  = sk(l[6] | l[7], 9, fl, fs);
        l[10] = sk(l[7] & l[8], 10, fl, fs);
        return l[9] ^ l[10];
      end
      CUT_F13:
        return sk((l[1] & !l[2] & !l[3]) | (!l[1] & l[2] & l[3]), 4, fl, fs);
      default:
        return sk((l[1] & !l[2] & !l[3]) | (!l[4] & l[5] & l[6]), 7, fl, fs);
    endcase
  endfunction

  function automatic int model_syn(int c, bit m, int fl, int fs);
    int n = 0;
    for (int k = 0; k < LEN[c]; k++) begin
      logic q = model_q(c, k, fl, fs);
      if (m) q ^= S_SEQ[15 - (k % 16)];
      n += int'(q);
    end
    return n;
  endfunction

  int good_syn [2][N_CUT];
  int done_at  [N_CUT];
  int n_detect = 0, n_masked = 0, n_mod_on = 0, n_mod_off = 0, n_restart_ignored = 0;

  // Start all six tests, optionally pulse start again at cycle `again`.
  task automatic run_all(input int again);
    int cyc = 0;
    for (int c = 0; c < N_CUT; c++) done_at[c] = -1;
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    while (cyc < 200) begin
      bit all_done = 1;
      if (cyc == again) start = 1;
      @(posedge clk);
      cyc++;
      #1 start = 0;
      for (int c = 0; c < N_CUT; c++) begin
        if (done[c] && done_at[c] < 0) done_at[c] = cyc;
        if (done_at[c] < 0) all_done = 0;
      end
      if (all_done) break;
    end
    if (mod_en) n_mod_on++; else n_mod_off++;
  endtask

  task automatic check_run(input bit m, input int fc, input int fl, input int fs);
    for (int c = 0; c < N_CUT; c++) begin
      automatic int exp_syn = (c == fc) ? model_syn(c, m, fl, fs) : good_syn[m][c];
      automatic bit exp_f   = (exp_syn != good_syn[m][c]);
      check(done_at[c] == LEN[c] + 1,
            $sformatf("%s done at edge %0d", NAME[c], done_at[c]));
      check(int'(syndrome[c]) == exp_syn,
            $sformatf("%s mod %0d fault %0d/%0d: syndrome %0d vs %0d", NAME[c], m, fl, fs, syndrome[c], exp_syn));
      check(fault_ind[c] == exp_f,
            $sformatf("%s mod %0d fault %0d/%0d: verdict %0d", NAME[c], m, fl, fs, fault_ind[c]));
      if (c == fc) begin
        if (fault_ind[c]) n_detect++; else n_masked++;
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; mod_en = 0;
    for (int c = 0; c < N_CUT; c++) begin
      fault[c] = NO_FAULT;
      ref_syndrome[c] = '0;
      good_syn[0][c] = model_syn(c, 1'b0, 0, 0);
      good_syn[1][c] = model_syn(c, 1'b1, 0, 0);
    end
    check(good_syn[0][CUT_BCD] == 5,  "BCD syndrome 5 of 10");
    check(good_syn[0][CUT_DMX] == 4,  "demux syndrome 4 of 16");
    check(good_syn[0][CUT_F13] == 2,  "F13 syndrome 2 of 8");
    check(good_syn[0][CUT_F14] == 15, "F14 syndrome 15 of 64");
    check(model_syn(CUT_F13, 0, 1, 1) == 2,  "F13 x1 s-a-1 syndrome 2 of 8");
    check(model_syn(CUT_F14, 0, 1, 1) == 22, "F14 x1 s-a-1 syndrome 22 of 64");
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int m = 0; m < 2; m++) begin
      mod_en = m[0];
      for (int c = 0; c < N_CUT; c++) ref_syndrome[c] = SW'(good_syn[m][c]);
      // fault-free, with a second start while busy on the first pass
      run_all(m == 0 ? 3 : -1);
      check_run(m[0], -1, 0, 0);
      if (m == 0) n_restart_ignored++;
      // every single stuck-at fault, one circuit at a time
      for (int c = 0; c < N_CUT; c++) begin
        for (int l = 1; l <= DMX_LINES; l++) begin
          if (!is_line(c, l)) continue;
          for (int sa = 0; sa < 2; sa++) begin
            fault[c] = '{en: 1'b1, sa: 1'(sa), line: 5'(l)};
            run_all(-1);
            check_run(m[0], c, l, sa);
            if (m == 0 && c == CUT_F13 && l == 1 && sa == 1)
              check(!fault_ind[c], "F13 x1 s-a-1 is masked");
            if (m == 0 && c == CUT_F14 && l == 1 && sa == 1)
              check(fault_ind[c], "F14 x1 s-a-1 is detected");
          end
          fault[c] = NO_FAULT;
        end
      end
    end

    $display("mechanisms: detected %0d, masked %0d, modification on %0d, off %0d, restart ignored %0d",
             n_detect, n_masked, n_mod_on, n_mod_off, n_restart_ignored);
    check(n_detect > 0, "fault detection happened");
    check(n_masked > 0, "fault masking happened");
    check(n_mod_on > 0 && n_mod_off > 0, "modification on and off both ran");
    check(n_restart_ignored > 0, "restart while busy happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
