// tb_compaction_tree: checks the space compressor.
// 1) The EXOR tree of the BCD example over the ten decimal responses: the
//    stage-1 nodes must give O5 = 0110011001 and O6 = 0000111111 and the
//    output O5 ^ O6.
// 2) An OR tree (demultiplexer example) and a 5-input mixed tree with an odd
//    line passing a stage, against a hand-written reference, on random and
//    exhaustive inputs.
module tb_compaction_tree;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] r4x, r4o;
  logic [2:0] n4x, n4o;
  logic       o4x, o4o;
  logic [4:0] r5;
  logic [3:0] n5;
  logic       o5;

  compaction_tree #(.M(4), .GATES({GATE_XOR, GATE_XOR, GATE_XOR, GATE_XOR})) u_x (
    .resp(r4x), .nodes(n4x), .out(o4x));
  compaction_tree #(.M(4), .GATES({GATE_OR, GATE_OR, GATE_OR, GATE_OR})) u_o (
    .resp(r4o), .nodes(n4o), .out(o4o));
  // node0 = AND(r0,r1), node1 = OR(r2,r3), r4 passes; node2 = XOR(n0,n1),
  // r4 passes; node3 = AND(n2, r4).
  compaction_tree #(.M(5), .GATES({GATE_XOR, GATE_AND, GATE_XOR, GATE_OR, GATE_AND})) u_m (
    .resp(r5), .nodes(n5), .out(o5));

  // BCD outputs over the ten decimal codes, bit k = code k (LSB = code 0 is
  // written last in the hex sequences 155h, 0CCh, 03Ch, 003h read as
  // code 0 first).
  localparam logic [9:0] SEQ_O1 = 10'b0101010101;
  localparam logic [9:0] SEQ_O2 = 10'b0011001100;
  localparam logic [9:0] SEQ_O3 = 10'b0000111100;
  localparam logic [9:0] SEQ_O4 = 10'b0000000011;
  localparam logic [9:0] SEQ_O5 = 10'b0110011001;
  localparam logic [9:0] SEQ_O6 = 10'b0000111111;

  initial begin
    for (int k = 0; k < 10; k++) begin
      r4x = {SEQ_O4[9-k], SEQ_O3[9-k], SEQ_O2[9-k], SEQ_O1[9-k]};
      #1;
      check(n4x[0] == SEQ_O5[9-k], $sformatf("O5 at code %0d", k));
      check(n4x[1] == SEQ_O6[9-k], $sformatf("O6 at code %0d", k));
      check(o4x == (SEQ_O5[9-k] ^ SEQ_O6[9-k]), $sformatf("BCD tree out at code %0d", k));
    end
    for (int v = 0; v < 16; v++) begin
      r4o = 4'(v);
      #1;
      check(n4o[0] == (r4o[0] | r4o[1]) && n4o[1] == (r4o[2] | r4o[3]), "OR stage 1");
      check(o4o == (v != 0), $sformatf("OR tree out for %b", r4o));
    end
    for (int v = 0; v < 32; v++) begin
      logic a, b, c;
      r5 = 5'(v);
      #1;
      a = r5[0] & r5[1];
      b = r5[2] | r5[3];
      c = a ^ b;
      check(n5 == {c & r5[4], c, b, a}, $sformatf("mixed tree nodes for %b", r5));
      check(o5 == (c & r5[4]), $sformatf("mixed tree out for %b", r5));
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
