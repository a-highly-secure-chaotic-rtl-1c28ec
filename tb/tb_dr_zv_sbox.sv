// Self-checking testbench of the zero-value compensated dual-rail S-box.
// All 256 inputs are applied as valid dual-rail bytes and compared with a
// reference S-box computed here independently (inverse as a^254 in the AES
// field, then the FIPS-197 affine transform).  A NULL input must give a
// NULL output, and every output bit must be a valid pair.
module tb_dr_zv_sbox;
  import aes_dr_pkg::*;

  dr_byte_t x, y;
  int checks = 0, failures = 0;

  dr_zv_sbox dut (.x(x), .y(y));

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv = 8'h01, s;
    for (int i = 0; i < 254; i++) inv = gmul(inv, a);
    if (a == 0) inv = 0;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ AFFINE_C[i];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    logic ok;
    x = '0;
    #1;
    checks++;
    if (y != '0) begin failures++; $display("NULL in gave non-NULL out"); end
    for (int v = 0; v < 256; v++) begin
      x = dr_enc8(8'(v));
      #1;
      ok = 1'b1;
      for (int i = 0; i < 8; i++) begin
        got[i] = y[i].t;
        ok &= y[i].t ^ y[i].f;
      end
      checks++;
      if (!ok || got != ref_sbox(8'(v))) begin
        failures++;
        $display("sbox(%02x) = %02x valid=%0b, expected %02x", v, got, ok, ref_sbox(8'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
