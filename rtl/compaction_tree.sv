// compaction_tree: the space compressor of MDSC.
//
// Merges the M response lines of the circuit under test into one line with
// a tree of two-input gates, each an AND, OR or EXOR.  Stage 1 pairs lines
// (1,2), (3,4), ...; every later stage pairs the previous stage's results in
// the same way; an odd line left over in a stage passes on to the next.  The
// operator of each node is fixed by GATES, chosen off-line by the method's
// detectable-error-probability rule (E = S1*R1/2L + S2*R2/L).  Nodes are
// numbered stage by stage, top to bottom: for M = 4, node 0 merges O1/O2,
// node 1 merges O3/O4 and node 2 merges their results.  GATES packs one
// 2-bit gate_e code per node, node k in GATES[2k+1:2k]; it has room for M
// codes and the top one is unused (an M-input tree has M-1 nodes).
// Purely combinational: it adds no cycle to the test.  `nodes` brings out
// every node's output for observation.
module compaction_tree
  import mdsc_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter logic [2*M-1:0] GATES = {M{GATE_XOR}}
) (
  input  logic [M-1:0] resp,
  output logic [M-2:0] nodes,
  output logic         out
);
  // Lines alive in stage s (stage 0 = the CUT outputs).
  function automatic int unsigned cnt(int unsigned s);
    int unsigned c = M;
    for (int unsigned i = 0; i < s; i++) c = (c + 1) / 2;
    return c;
  endfunction

  // Number of the first gate of stage s.
  function automatic int unsigned goff(int unsigned s);
    int unsigned o = 0;
    for (int unsigned i = 0; i < s; i++) o += cnt(i) / 2;
    return o;
  endfunction

  localparam int unsigned NSTAGE = $clog2(M);

  // g_stage[s].v holds the cnt(s+1) lines leaving stage s+1.
  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    logic [cnt(s+1)-1:0] v;
    logic [cnt(s)-1:0]   u;   // lines entering this stage

    if (s == 0) begin : g_first
      assign u = resp;
    end else begin : g_next
      assign u = g_stage[s-1].v;
    end

    for (genvar j = 0; j < cnt(s) / 2; j++) begin : g_node
      assign v[j] = apply_gate(gate_e'(GATES[2*(goff(s)+j) +: 2]), u[2*j], u[2*j+1]);
      assign nodes[goff(s) + j] = v[j];
    end
    if (cnt(s) % 2 == 1) begin : g_pass
      assign v[cnt(s)/2] = u[cnt(s) - 1];
    end
  end

  assign out = g_stage[NSTAGE-1].v[0];

  initial assert (M >= 2) else $error("a compaction tree needs at least two lines");

endmodule
