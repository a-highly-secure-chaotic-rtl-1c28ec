// Testbench of the asynchronous-logic AES core on its own (DEPTH = 64).
// The testbench releases the dual-rail plaintext, key and first Rcon
// itself, in four random groups, after reset.  For the FIPS-197 vector and
// random blocks with random control words it waits for `done` and checks
// the ciphertext, that it stays put after `done`, and that `done` comes
// within the bound of 1000 unit-delay clocks.  Control words 00000000 and
// 3f3f3f3f give the shortest and longest randomizer delays.  Four handshake
// phases are stretched: the valid phases of rounds 1, 9 and 10 and the NULL
// phase of round 10 (the NULL phase of round 9 begins before the controller
// switches into delay mode), so the longest run must take close to 4 x 63
// clocks more than the shortest; parts of a stretched NULL phase can
// overlap other work, so a few clocks of slack are allowed.
module tb_aes_async_core;
  import aes_dr_pkg::*;
  import aes_ref_pkg::*;
  import tb_util_pkg::*;

  logic         clk = 0, rst_n = 0;
  dr_block_t    pt = '0, key = '0;
  dr_byte_t     rcon0 = '0;
  logic [31:0]  ctrl = '0;
  logic [127:0] ct;
  logic         done, delay_on, ring_mode;
  logic [3:0]   round_cnt;
  int           checks = 0, failures = 0;

  aes_async_core dut (.clk(clk), .rst_n(rst_n), .pt(pt), .key(key), .rcon0(rcon0), .ctrl(ctrl),
                      .ct(ct), .done(done), .round_cnt(round_cnt), .delay_on(delay_on),
                      .ring_mode(ring_mode));

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] p, input logic [127:0] k, input logic [31:0] c,
                     output int cycles);
    logic [127:0] exp_ct = encrypt(p, k);
    dr_block_t pe = enc128(p), ke = enc128(k);
    dr_byte_t  re = enc8(8'h01);
    int t_rel [4];
    @(negedge clk);
    rst_n = 0;
    pt    = '0;
    key   = '0;
    rcon0 = '0;
    ctrl  = c;
    for (int g = 0; g < 4; g++) t_rel[g] = $urandom % 8;
    repeat (2) @(negedge clk);
    rst_n  = 1;
    cycles = 0;
    while (!done && cycles < 1000) begin
      for (int i = 0; i < 128; i++) if (cycles >= t_rel[i % 4]) begin pt[i] = pe[i]; key[i] = ke[i]; end
      for (int i = 0; i < 8; i++) if (cycles >= t_rel[i % 4]) rcon0[i] = re[i];
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (!done) begin failures++; $display("no done after %0d clocks", cycles); end
    checks++;
    if (ct != exp_ct) begin failures++; $display("ct %032x expected %032x", ct, exp_ct); end
    repeat (50) @(negedge clk);
    checks++;
    if (ct != exp_ct || !done) begin failures++; $display("result not held"); end
  endtask

  initial begin
    int c_min, c_max, c;
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 32'h0, c);
    checks++;
    if (ct != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FIPS-197 wrong"); end
    run(128'h0, 128'h0, 32'h0000_0000, c_min);
    run(128'h0, 128'h0, 32'h3f3f_3f3f, c_max);
    $display("core clocks: shortest %0d, longest %0d", c_min, c_max);
    checks++;
    if (c_max - c_min < 4 * 63 - 8 || c_max - c_min > 4 * 63) begin
      failures++;
      $display("delay span %0d, expected about %0d", c_max - c_min, 4 * 63);
    end
    for (int i = 0; i < 6; i++) run({$urandom, $urandom, $urandom, $urandom},
                                    {$urandom, $urandom, $urandom, $urandom}, $urandom, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
