// Testbench of the dual-rail AES round: random states and round keys, both
// normal rounds and last rounds (no MixColumns), against the reference
// model.  The output must stay NULL while the last-round flag, the state or
// the key is NULL.
module tb_dr_round;
  import aes_dr_pkg::*;
  import aes_ref_pkg::*;
  import tb_util_pkg::*;

  dr_block_t s, rk, y;
  dr_t       last;
  int checks = 0, failures = 0;

  dr_round dut (.s(s), .rk(rk), .last(last), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v, k, got, exp_v;
    bit ok;
    for (int i = 0; i < 30; i++) begin
      automatic bit is_last = (i % 3 == 2);
      v = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) v = '0;  // all S-boxes on the zero-value path
      s    = enc128(v);
      rk   = enc128(k);
      last = '0;
      #1;
      checks++;
      if (!is_null128(y)) begin failures++; $display("output valid with NULL flag"); end
      last = '{t: is_last, f: !is_last};
      #1;
      exp_v = is_last ? sub_shift(v) ^ k : mix(sub_shift(v)) ^ k;
      ok = dec128(y, got);
      checks++;
      if (!ok || got != exp_v) begin
        failures++;
        $display("round last=%0b s=%032x: %032x expected %032x", is_last, v, got, exp_v);
      end
      s = '0;
      #1;
      checks++;
      if (!is_null128(y)) begin failures++; $display("output valid with NULL state"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
