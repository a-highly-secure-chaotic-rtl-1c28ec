// End-to-end testbench of the dual-hiding AES accelerator at its default
// parameters (DEPTH = 64 unit delays, 14-cycle window).
//
// The unit-delay clock runs with a 2 ns period and the system clock with a
// 100 ns period, so the 14-cycle window holds 700 unit delays, more than
// the worst case of about 80 + 7*64.  The test encrypts the FIPS-197
// vector, a block equal to its key (every S-box of round 1 sees zero, which
// exercises the zero-value compensation), and random blocks with random
// control words, back to back, checking each ciphertext against the
// reference model, the 14-cycle start-to-done latency and that `late` stays
// 0.  A last encryption with a 10 ns system clock is too fast for the core
// and must raise `late`.  It counts the core's mechanisms (ring closing,
// randomized and bypassed rounds, the stop after round 10, zero-value
// compensation, chaotic changes of the control word) and fails any that
// never happened.
module tb_aes_dual_hiding_top;
  import aes_ref_pkg::*;

  localparam int N_RANDOM = 6;

  logic         clk = 0, uclk = 0, rst_n = 0, start = 0;
  logic [127:0] plaintext = '0, key = '0, ciphertext;
  logic [31:0]  ctrl = '0;
  logic         busy, done, late;
  int           clk_half = 50;

  int checks = 0, failures = 0;
  int n_ring = 0, n_delayed = 0, n_bypassed = 0, n_stop = 0, n_zv = 0, n_chaos = 0, n_late = 0;
  int max_core_cycles = 0;
  int d_snap = 0, b_snap = 0;

  aes_dual_hiding_top dut (
    .clk        (clk),
    .uclk       (uclk),
    .rst_n      (rst_n),
    .start      (start),
    .plaintext  (plaintext),
    .key        (key),
    .ctrl       (ctrl),
    .busy       (busy),
    .done       (done),
    .late       (late),
    .ciphertext (ciphertext),
    .core_round       (),
    .core_delay_on    (),
    .core_ring_closed ()
  );

  always #1 uclk = ~uclk;
  always #(clk_half) clk = ~clk;

  // ------------------------------------------------ mechanism monitors
  logic       ring_q = 1, halt_q = 1, lack_q = 1;
  int         core_cycles = 0;
  always @(posedge uclk) if (rst_n) begin
    // counting starts after reset, so power-up values are never counted
    ring_q <= dut.u_core.ring_mode;
    halt_q <= dut.u_core.halt;
    lack_q <= dut.u_core.lack1;
    if (dut.u_core.ring_mode && !ring_q) begin
      n_ring++;
      // round 1 is released from reset, not by a Lack edge
      if (dut.u_core.delay_on) n_delayed++;
      else                     n_bypassed++;
    end
    if (dut.u_core.halt && !halt_q) n_stop++;
    // one count per Lack rising edge, i.e. per round input released
    if (dut.u_core.lack1 && !lack_q && dut.core_rst_n) begin
      if (dut.u_core.delay_on) n_delayed++;
      else                     n_bypassed++;
    end
    if (dut.u_core.u_round.g_sbox[0].u_sbox.z.t) n_zv++;
    if (dut.core_rst_n && !dut.u_core.done) core_cycles++;
    if (!dut.core_rst_n) core_cycles = 0;
    if (dut.u_core.done && core_cycles > max_core_cycles) max_core_cycles = core_cycles;
  end

  // -------------------------------------------------------- one block
  logic [31:0] last_ctrl_q = '0;
  task automatic encrypt_one(input logic [127:0] p, input logic [127:0] k,
                             input logic [31:0] c, input bit expect_late);
    logic [127:0] exp_ct;
    int cycles;
    exp_ct = encrypt(p, k);
    @(negedge clk);
    plaintext = p;
    key       = k;
    ctrl      = c;
    start     = 1;
    @(negedge clk);
    start  = 0;
    cycles = 1;
    checks++;
    if (dut.u_sync.ctrl_q != last_ctrl_q) n_chaos++;
    last_ctrl_q = dut.u_sync.ctrl_q;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles - 1 != 14) begin
      failures++;
      $display("latency %0d clk cycles, expected 14", cycles - 1);
    end
    checks++;
    if (late != expect_late) begin
      failures++;
      $display("late = %0b, expected %0b", late, expect_late);
    end
    if (late) n_late++;
    if (!expect_late) begin
      checks++;
      if (ciphertext !== exp_ct) begin
        failures++;
        $display("pt %032x key %032x: ct %032x expected %032x", p, k, ciphertext, exp_ct);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 appendix C.1
    encrypt_one(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
                32'h0000_0000, 0);
    checks++;
    if (ciphertext !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FIPS-197 vector failed");
    end
    // state zero after the pre-round key addition
    encrypt_one(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h2b7e151628aed2a6abf7158809cf4f3c,
                32'h3f3f_3f3f, 0);
    for (int i = 0; i < N_RANDOM; i++)
      encrypt_one({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
                  $urandom, 0);
    d_snap = n_delayed;
    b_snap = n_bypassed;
    // system clock too fast for the core: the capture must be flagged
    clk_half = 5;
    encrypt_one(128'h0, 128'h0, 32'hffff_ffff, 1);

    $display("ring closings %0d, delayed rounds %0d, bypassed rounds %0d, stops %0d, zero-value cycles %0d, ctrl changes %0d, late %0d, slowest core %0d unit delays",
             n_ring, n_delayed, n_bypassed, n_stop, n_zv, n_chaos, n_late, max_core_cycles);
    checks++; if (n_ring == 0)     begin failures++; $display("ring never closed"); end
    checks++; if (n_delayed == 0)  begin failures++; $display("no randomized round"); end
    checks++; if (n_bypassed == 0) begin failures++; $display("no bypassed round"); end
    checks++; if (n_stop == 0)     begin failures++; $display("rings never stopped"); end
    checks++; if (n_zv == 0)       begin failures++; $display("zero-value compensation never used"); end
    checks++; if (n_chaos < 2)     begin failures++; $display("control word never changed"); end
    checks++; if (n_late == 0)     begin failures++; $display("late never raised"); end
    // three delayed and seven bypassed round releases per encryption
    checks++;
    if (d_snap * 7 != b_snap * 3 || d_snap != 3 * (N_RANDOM + 2)) begin
      failures++;
      $display("delayed/bypassed rounds wrong: %0d/%0d", d_snap, b_snap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
