// Testbench of the dual-rail MixColumns: the FIPS-197 column example and
// random states against the reference model; NULL in gives NULL out.
module tb_dr_mix_columns;
  import aes_dr_pkg::*;
  import aes_ref_pkg::*;
  import tb_util_pkg::*;

  dr_block_t s, y;
  int checks = 0, failures = 0;

  dr_mix_columns dut (.s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [127:0] v);
    logic [127:0] got;
    bit ok;
    s = enc128(v);
    #1;
    ok = dec128(y, got);
    checks++;
    if (!ok || got != mix(v)) begin
      failures++;
      $display("mix(%032x) = %032x, expected %032x", v, got, mix(v));
    end
  endtask

  initial begin
    s = '0;
    #1;
    checks++;
    if (!is_null128(y)) begin failures++; $display("NULL not propagated"); end
    // FIPS-197 round 1 column: d4 bf 5d 30 -> 04 66 81 e5
    one(128'hd4bf5d30_00000000_00000000_00000000);
    checks++;
    if (y[127:96] != enc128(128'h046681e5_00000000_00000000_00000000)[127:96]) begin
      failures++;
      $display("FIPS-197 column wrong");
    end
    for (int i = 0; i < 50; i++) one({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
