// mdsc_bist_top: MDSC built-in self-test of the example circuits.
//
// Six independent self-tests stand side by side, one per circuit under test,
// all started by the same `start` pulse.  Each is an mdsc_bist (pattern
// generator, compaction tree, output modifier, syndrome counter, equality
// checker) wired to its CUT:
//   CUT_BCD  decimal to BCD converter, 9 in / 4 out, the ten decimal codes
//            (LEN 10), tree O5 = O1^O2, O6 = O3^O4, out = O5^O6.
//   CUT_DMX  4-output demultiplexer, 4 in / 4 out, 16 exhaustive vectors,
//            tree O12 = O1|O2, O34 = O3|O4, out = O12|O34.
//   CUT_F5   alpha/beta example, 5 in / 2 out, 32 vectors, one OR node.
//   CUT_F6   Boolean-difference example, 5 in / 2 out, 32 vectors, one EXOR.
//   CUT_F13  single-output, syndrome-untestable circuit, 8 vectors.
//   CUT_F14  single-output, syndrome-testable circuit, 64 vectors.
// The BCD and demultiplexer trees are the ones the selection rule produced
// for them; the F5/F6 nodes are what the same rule E = S1 R1/2L + S2 R2/L
// selects with their S1/S2 (OR: E = 0.90 vs EXOR 0.84; EXOR: 0.94 vs OR
// 0.71) -- a choice of this design.  The single-output circuits go straight
// to the counter.  All modifiers use the same 16-bit sequence; `mod_en`
// turns modification on for all of them.
//
// Ports are arrays indexed by mdsc_pkg::CUT_*: ref_syndrome[i] is the stored
// fault-free syndrome (its low bits are used), fault[i] injects one stuck-at
// fault into CUT i (tie to NO_FAULT in use).  done[i]/fault_ind[i] rise
// on the (LEN_i + 1)th clock edge after the start edge; syndrome[i] is zero-extended.
// compacted[i], mod_seq[i] and modified[i] show, in each test cycle, the
// tree output Q, the modifier bit S and Q' = Q ^ S fed to the counter.
module mdsc_bist_top
  import mdsc_pkg::*;
#(
  parameter int unsigned   BCD_LEN  = 10,
  parameter pattern_mode_e BCD_MODE = PAT_DECIMAL
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     mod_en,
  input  logic [SW-1:0]            ref_syndrome [N_CUT],
  input  stuck_fault_t             fault        [N_CUT],
  output logic [SW-1:0]            syndrome     [N_CUT],
  output logic [N_CUT-1:0]         busy,
  output logic [N_CUT-1:0]         done,
  output logic [N_CUT-1:0]         fault_ind,
  output logic [N_CUT-1:0]         compacted,
  output logic [N_CUT-1:0]         modified,
  output logic [N_CUT-1:0]         mod_seq
);
  localparam int unsigned LEN_DMX = 16;
  localparam int unsigned LEN_F5  = 32;
  localparam int unsigned LEN_F6  = 32;
  localparam int unsigned LEN_F13 = 8;
  localparam int unsigned LEN_F14 = 64;

  // ---- decimal to BCD converter, EXOR tree --------------------------------
  localparam int unsigned CW_BCD = $clog2(BCD_LEN + 1);
  logic [8:0]        bcd_x;
  logic [3:0]        bcd_o;
  logic [CW_BCD-1:0] bcd_syn;

  bcd_encoder_cut u_bcd_cut (.x(bcd_x), .fault(fault[CUT_BCD]), .o(bcd_o));

  mdsc_bist #(
    .N_IN(9), .M(4), .LEN(BCD_LEN), .MODE(BCD_MODE),
    .GATES({GATE_XOR, GATE_XOR, GATE_XOR, GATE_XOR})
  ) u_bcd_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_BCD][CW_BCD-1:0]),
    .cut_pattern(bcd_x), .cut_response(bcd_o),
    .compacted(compacted[CUT_BCD]), .modified(modified[CUT_BCD]),
    .mod_bit(mod_seq[CUT_BCD]),
    .syndrome(bcd_syn), .busy(busy[CUT_BCD]), .done(done[CUT_BCD]),
    .fault(fault_ind[CUT_BCD])
  );
  assign syndrome[CUT_BCD] = SW'(bcd_syn);

  // ---- 4-output demultiplexer, OR tree ------------------------------------
  localparam int unsigned CW_DMX = $clog2(LEN_DMX + 1);
  logic [3:0]        dmx_x, dmx_o;
  logic [CW_DMX-1:0] dmx_syn;

  demux4_cut u_dmx_cut (.x(dmx_x), .fault(fault[CUT_DMX]), .o(dmx_o));

  mdsc_bist #(
    .N_IN(4), .M(4), .LEN(LEN_DMX), .MODE(PAT_EXHAUSTIVE),
    .GATES({GATE_OR, GATE_OR, GATE_OR, GATE_OR})
  ) u_dmx_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_DMX][CW_DMX-1:0]),
    .cut_pattern(dmx_x), .cut_response(dmx_o),
    .compacted(compacted[CUT_DMX]), .modified(modified[CUT_DMX]),
    .mod_bit(mod_seq[CUT_DMX]),
    .syndrome(dmx_syn), .busy(busy[CUT_DMX]), .done(done[CUT_DMX]),
    .fault(fault_ind[CUT_DMX])
  );
  assign syndrome[CUT_DMX] = SW'(dmx_syn);

  // ---- alpha/beta example circuit, one OR node ----------------------------
  localparam int unsigned CW_F5 = $clog2(LEN_F5 + 1);
  logic [4:0]       f5_x;
  logic [1:0]       f5_o;
  logic [CW_F5-1:0] f5_syn;

  fig5_cut u_f5_cut (.x(f5_x), .fault(fault[CUT_F5]), .o(f5_o));

  mdsc_bist #(
    .N_IN(5), .M(2), .LEN(LEN_F5), .MODE(PAT_EXHAUSTIVE),
    .GATES({GATE_OR, GATE_OR})
  ) u_f5_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_F5][CW_F5-1:0]),
    .cut_pattern(f5_x), .cut_response(f5_o),
    .compacted(compacted[CUT_F5]), .modified(modified[CUT_F5]),
    .mod_bit(mod_seq[CUT_F5]),
    .syndrome(f5_syn), .busy(busy[CUT_F5]), .done(done[CUT_F5]),
    .fault(fault_ind[CUT_F5])
  );
  assign syndrome[CUT_F5] = SW'(f5_syn);

  // ---- Boolean-difference example circuit, one EXOR node ------------------
  localparam int unsigned CW_F6 = $clog2(LEN_F6 + 1);
  logic [4:0]       f6_x;
  logic [1:0]       f6_o;
  logic [CW_F6-1:0] f6_syn;

  fig6_cut u_f6_cut (.x(f6_x), .fault(fault[CUT_F6]), .o(f6_o));

  mdsc_bist #(
    .N_IN(5), .M(2), .LEN(LEN_F6), .MODE(PAT_EXHAUSTIVE),
    .GATES({GATE_XOR, GATE_XOR})
  ) u_f6_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_F6][CW_F6-1:0]),
    .cut_pattern(f6_x), .cut_response(f6_o),
    .compacted(compacted[CUT_F6]), .modified(modified[CUT_F6]),
    .mod_bit(mod_seq[CUT_F6]),
    .syndrome(f6_syn), .busy(busy[CUT_F6]), .done(done[CUT_F6]),
    .fault(fault_ind[CUT_F6])
  );
  assign syndrome[CUT_F6] = SW'(f6_syn);

  // ---- syndrome-untestable single-output circuit --------------------------
  localparam int unsigned CW_F13 = $clog2(LEN_F13 + 1);
  logic [2:0]        f13_x;
  logic              f13_o;
  logic [CW_F13-1:0] f13_syn;

  fig13_cut u_f13_cut (.x(f13_x), .fault(fault[CUT_F13]), .f(f13_o));

  mdsc_bist #(
    .N_IN(3), .M(1), .LEN(LEN_F13), .MODE(PAT_EXHAUSTIVE),
    .GATES({GATE_XOR})
  ) u_f13_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_F13][CW_F13-1:0]),
    .cut_pattern(f13_x), .cut_response(f13_o),
    .compacted(compacted[CUT_F13]), .modified(modified[CUT_F13]),
    .mod_bit(mod_seq[CUT_F13]),
    .syndrome(f13_syn), .busy(busy[CUT_F13]), .done(done[CUT_F13]),
    .fault(fault_ind[CUT_F13])
  );
  assign syndrome[CUT_F13] = SW'(f13_syn);

  // ---- syndrome-testable single-output circuit ----------------------------
  localparam int unsigned CW_F14 = $clog2(LEN_F14 + 1);
  logic [5:0]        f14_x;
  logic              f14_o;
  logic [CW_F14-1:0] f14_syn;

  fig14_cut u_f14_cut (.x(f14_x), .fault(fault[CUT_F14]), .f(f14_o));

  mdsc_bist #(
    .N_IN(6), .M(1), .LEN(LEN_F14), .MODE(PAT_EXHAUSTIVE),
    .GATES({GATE_XOR})
  ) u_f14_bist (
    .clk, .rst_n, .start, .mod_en,
    .ref_syndrome(ref_syndrome[CUT_F14][CW_F14-1:0]),
    .cut_pattern(f14_x), .cut_response(f14_o),
    .compacted(compacted[CUT_F14]), .modified(modified[CUT_F14]),
    .mod_bit(mod_seq[CUT_F14]),
    .syndrome(f14_syn), .busy(busy[CUT_F14]), .done(done[CUT_F14]),
    .fault(fault_ind[CUT_F14])
  );
  assign syndrome[CUT_F14] = SW'(f14_syn);

  initial assert (BCD_LEN < 2**SW) else $error("BCD_LEN too large for SW");

endmodule
