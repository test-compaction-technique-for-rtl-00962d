// tb_demux4_cut: all 16 rows of the demultiplexer truth table (only rows
// 0100..0111 of X(1..4) are active, one output each, every output of
// weight 1). Faults on the primary lines (X1..X4 = lines 1..4, O1..O4 =
// lines 10..13) must act like the forced input or output in the table. For
// all 62 single stuck-at faults (31 lines), all 16 rows are compared with
// the net-list reference model in demux_gate_ref.svh, and each fault must
// change the outputs for at least one row.
module tb_demux4_cut;
  import mdsc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0]   x, o;
  stuck_fault_t f;

  demux4_cut u_dut (.x, .fault(f), .o);

  `include "demux_gate_ref.svh"

  // Truth table rows, X(1) X(2) X(3) X(4) -> O(1..4) written O1 first.
  function automatic logic [3:0] table_row(int r);
    case (r)
      4: return 4'b0001;   // O1
      5: return 4'b0010;   // O2
      6: return 4'b0100;   // O3
      7: return 4'b1000;   // O4
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic [3:0] to_x(int r);  // x[0] = X(1) = MSB of r
    return {1'(r), 1'(r >> 1), 1'(r >> 2), 1'(r >> 3)};
  endfunction

  initial begin
    int w [4];
    f = NO_FAULT;
    w = '{0, 0, 0, 0};
    for (int r = 0; r < 16; r++) begin
      x = to_x(r);
      #1;
      check(o == table_row(r), $sformatf("row %0d: %b", r, o));
      for (int k = 0; k < 4; k++) w[k] += int'(o[k]);
    end
    check(w[0] == 1 && w[1] == 1 && w[2] == 1 && w[3] == 1, "weights 1 1 1 1");
    for (int line = 1; line <= 13; line++) begin
      if (line > 4 && line < 10) continue;
      for (int sa = 0; sa < 2; sa++) begin
        f = '{en: 1'b1, sa: 1'(sa), line: 5'(line)};
        for (int r = 0; r < 16; r++) begin
          logic [3:0] e;
          x = to_x(r);
          #1;
          if (line <= 4) begin
            automatic int rr = r;
            automatic int bitpos = 4 - line;   // X(1) is bit 3 of r
            rr = sa ? (rr | (1 << bitpos)) : (rr & ~(1 << bitpos));
            e = table_row(rr);
          end else begin
            e = table_row(r);
            e[line-10] = 1'(sa);
          end
          check(o == e, $sformatf("line %0d s-a-%0d row %0d", line, sa, r));
        end
      end
    end
    for (int line = 1; line <= DMX_LINES; line++) begin
      for (int sa = 0; sa < 2; sa++) begin
        automatic bit seen = 0;
        automatic int bad = 0;
        f = '{en: 1'b1, sa: 1'(sa), line: 5'(line)};
        for (int r = 0; r < 16; r++) begin
          x = to_x(r);
          #1;
          if (o != demux_gate_ref(x, line, sa)) bad++;
          if (o != table_row(r)) seen = 1;
        end
        check(bad == 0, $sformatf("line %0d s-a-%0d: %0d rows differ from the model", line, sa, bad));
        check(seen, $sformatf("line %0d s-a-%0d changes the outputs", line, sa));
      end
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
