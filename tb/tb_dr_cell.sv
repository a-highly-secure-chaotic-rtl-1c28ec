// Testbench of the dual-rail cell: every gate type with every pair of
// valid inputs against the Boolean gate, and NULL on either input must
// give a NULL output.
module tb_dr_cell;
  import aes_dr_pkg::*;

  gate_e gate;
  dr_t   a, b, y;
  int    checks = 0, failures = 0;

  dr_cell dut (.gate(gate), .a(a), .b(b), .y(y));

  function automatic logic ref_gate(gate_e g, logic x, logic z);
    case (g)
      G_AND:   return x & z;
      G_OR:    return x | z;
      G_XOR:   return x ^ z;
      G_NAND:  return ~(x & z);
      G_NOR:   return ~(x | z);
      default: return ~(x ^ z);
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_e gs [6] = '{G_AND, G_OR, G_XOR, G_NAND, G_NOR, G_XNOR};
    foreach (gs[k]) begin
      gate = gs[k];
      for (int v = 0; v < 4; v++) begin
        a = '{t: v[1], f: ~v[1]};
        b = '{t: v[0], f: ~v[0]};
        #1;
        checks++;
        if (y.t != ref_gate(gate, v[1], v[0]) || y.f != ~ref_gate(gate, v[1], v[0])) begin
          failures++;
          $display("gate %s a=%0b b=%0b -> {%0b,%0b}", gate.name(), v[1], v[0], y.t, y.f);
        end
        // NULL on one input
        a = '0;
        #1;
        checks++;
        if (y != '0) begin failures++; $display("gate %s: NULL a not NULL out", gate.name()); end
        a = '{t: v[1], f: ~v[1]};
        b = '0;
        #1;
        checks++;
        if (y != '0) begin failures++; $display("gate %s: NULL b not NULL out", gate.name()); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
