// Testbench of the dual-rail key expansion: the ten FIPS-197 appendix A.1
// round keys of key 2b7e1516..., then random keys and constants against the
// reference model.  A NULL Rcon must leave the first byte of every output word NULL.
module tb_dr_key_expand;
  import aes_dr_pkg::*;
  import aes_ref_pkg::*;
  import tb_util_pkg::*;

  dr_block_t k, y;
  dr_byte_t  rcon;
  int checks = 0, failures = 0;

  dr_key_expand dut (.k(k), .rcon(rcon), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, got;
    logic [7:0]   rc;
    bit ok;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rc  = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k    = enc128(key);
      rcon = enc8(rc);
      #1;
      ok = dec128(y, got);
      checks++;
      if (!ok || got != next_key(key, rc)) begin
        failures++;
        $display("round %0d key %032x expected %032x", r, got, next_key(key, rc));
      end
      key = next_key(key, rc);
      rc  = gmul(rc, 8'h02);
    end
    checks++;
    if (key != 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("last FIPS-197 round key wrong");
    end
    for (int i = 0; i < 20; i++) begin
      key  = {$urandom, $urandom, $urandom, $urandom};
      rc   = 8'($urandom);
      k    = enc128(key);
      rcon = '0;
      #1;
      // the Rcon byte reaches the first byte of every output word only
      for (int w = 0; w < 4; w++) begin
        checks++;
        if (y[127 - 32*w -: 8] != '0) begin failures++; $display("word %0d byte 0 valid with NULL rcon", w); end
      end
      rcon = enc8(rc);
      #1;
      ok = dec128(y, got);
      checks++;
      if (!ok || got != next_key(key, rc)) begin failures++; $display("random key mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
