// mdsc_pkg: types and helpers shared by the MDSC (modified dynamic space
// compression) BIST blocks.
//
// gate_e names the three two-input operators a compaction-tree node may use
// (AND, OR, EXOR); the tree's shape and the operator of each node are chosen
// off-line by the selection procedure and handed to the hardware as
// parameters.  pattern_mode_e selects how the test-pattern generator orders
// its vectors.  stuck_fault_t describes one single stuck-at fault that the
// example circuits under test can carry, so that a test bench can measure the
// fault coverage lost by compaction; in a real part the fault port is tied
// off (en = 0).
package mdsc_pkg;

  typedef enum logic [1:0] {
    GATE_AND = 2'd0,
    GATE_OR  = 2'd1,
    GATE_XOR = 2'd2
  } gate_e;

  typedef enum logic {
    PAT_EXHAUSTIVE = 1'b0,  // binary count, X(1) is the most significant bit
    PAT_DECIMAL    = 1'b1   // all-zero vector, then X(1), X(2), ... one at a time
  } pattern_mode_e;

  // One single stuck-at fault on a numbered line of a circuit under test.
  typedef struct packed {
    logic       en;    // fault present
    logic       sa;    // stuck-at value
    logic [4:0] line;  // line number, as numbered for each circuit
  } stuck_fault_t;

  // Circuits under test of mdsc_bist_top, by index into its port arrays.
  localparam int unsigned N_CUT   = 6;
  localparam int unsigned CUT_BCD = 0;  // decimal to 8421 BCD converter
  localparam int unsigned CUT_DMX = 1;  // 4-output demultiplexer
  localparam int unsigned CUT_F5  = 2;  // alpha/beta example circuit
  localparam int unsigned CUT_F6  = 3;  // Boolean difference example circuit
  localparam int unsigned CUT_F13 = 4;  // syndrome-untestable example
  localparam int unsigned CUT_F14 = 5;  // syndrome-testable example
  localparam int unsigned SW      = 10; // width of the top's syndrome ports

  localparam stuck_fault_t NO_FAULT = '{en: 1'b0, sa: 1'b0, line: 5'd0};

  // Value seen on line `line_no` when fault `f` may be present.
  function automatic logic on_line(logic value, int unsigned line_no, stuck_fault_t f);
    return (f.en && (int'(f.line) == int'(line_no))) ? f.sa : value;
  endfunction

  // Two-input compaction operator.
  function automatic logic apply_gate(gate_e g, logic a, logic b);
    unique case (g)
      GATE_AND: return a & b;
      GATE_OR:  return a | b;
      default:  return a ^ b;
    endcase
  endfunction

endpackage
