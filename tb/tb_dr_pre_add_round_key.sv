// Testbench of the dual-rail pre-round AddRoundKey: random plaintexts and
// keys give pt xor key; a NULL key bit gives a NULL state bit.
module tb_dr_pre_add_round_key;
  import aes_dr_pkg::*;
  import tb_util_pkg::*;

  dr_block_t pt, key, st;
  int checks = 0, failures = 0;

  dr_pre_add_round_key dut (.pt(pt), .key(key), .state(st));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p, k, got;
    bit ok;
    for (int i = 0; i < 50; i++) begin
      int nb;
      p   = {$urandom, $urandom, $urandom, $urandom};
      k   = {$urandom, $urandom, $urandom, $urandom};
      pt  = enc128(p);
      key = enc128(k);
      #1;
      ok = dec128(st, got);
      checks++;
      if (!ok || got != (p ^ k)) begin failures++; $display("pt^key mismatch"); end
      nb = $urandom % 128;
      key[nb] = '0;
      #1;
      checks++;
      if (st[nb] != '0) begin failures++; $display("NULL key bit %0d not NULL", nb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
