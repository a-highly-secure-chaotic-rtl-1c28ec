// Testbench of the synchronous interface with a stand-in for the core that
// raises its done flag a chosen number of clocks after `run` rises.
// Checks: `run` is high for exactly 14 cycles; `done` pulses 14 cycles
// after the start edge; the captured ciphertext and registered inputs
// (ctrl xor rnd) are right; `busy` holds and a start during busy is
// ignored; `late` is 0 when the core finishes in time and 1 when it does
// not.
module tb_aes_sync_if;
  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] pt_in = '0, key_in = '0, ciphertext, pt_q, key_q;
  logic [31:0]  ctrl_in = '0, rnd_in = '0, ctrl_q;
  logic         busy, done, late, run;
  logic         core_done = 0;
  logic [127:0] core_ct = '0;
  int           checks = 0, failures = 0;
  int           core_delay = 5, run_cycles = 0;

  aes_sync_if dut (.clk(clk), .rst_n(rst_n), .start(start), .pt_in(pt_in), .key_in(key_in),
                   .ctrl_in(ctrl_in), .rnd_in(rnd_in), .busy(busy), .done(done), .late(late),
                   .ciphertext(ciphertext), .run(run), .pt_q(pt_q), .key_q(key_q),
                   .ctrl_q(ctrl_q), .core_done(core_done), .core_ct(core_ct));

  always #5 clk = ~clk;

  // Core stand-in: result = pt ^ key, done after core_delay clocks of run.
  always @(posedge clk) begin
    if (!run) begin
      run_cycles = 0;
      core_done <= 0;
      core_ct   <= '0;
    end else begin
      run_cycles++;
      if (run_cycles >= core_delay) begin
        core_done <= 1;
        core_ct   <= pt_q ^ key_q;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int delay, input bit exp_late);
    int n = 0, nrun = 0;
    logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
    logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
    logic [31:0]  c = $urandom, r = $urandom;
    core_delay = delay;
    @(negedge clk);
    pt_in = p; key_in = k; ctrl_in = c; rnd_in = r; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (pt_q != p || key_q != k || ctrl_q != (c ^ r) || !busy) begin
      failures++; $display("inputs not registered");
    end
    // a second start while busy must be ignored
    pt_in = ~p; start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    nrun = 2;
    while (!done && n < 40) begin
      @(negedge clk);
      n++;
      if (run) nrun++;
    end
    checks++;
    if (n != 14) begin failures++; $display("done after %0d cycles, expected 14", n); end
    checks++;
    if (nrun != 14) begin failures++; $display("run high %0d cycles", nrun); end
    checks++;
    if (late != exp_late) begin failures++; $display("late=%0b expected %0b", late, exp_late); end
    if (!exp_late) begin
      checks++;
      if (ciphertext != (p ^ k)) begin failures++; $display("ciphertext not captured"); end
    end
    checks++;
    if (pt_q != p) begin failures++; $display("start during busy was taken"); end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("done not a single pulse"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) one(3 + i, 0);
    one(13, 1);   // too slow for the 14-cycle window with the 2-flop synchronizer
    one(30, 1);
    one(4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
