// Testbench of the dual-rail latch with completion detection (N = 16).
// Checks: a bit with enable 1 takes valid data and then holds it while its
// input returns to NULL; a bit with enable 0 ignores valid data; cd rises
// only when every bit is valid and falls only when every bit is NULL; with
// enable 0 and NULL input the latch empties.  Inputs follow the four-phase
// protocol: valid data always returns to NULL before the next valid data.
module tb_dr_latch_cd;
  import aes_dr_pkg::*;

  localparam int N = 16;
  logic         clk = 0, rst_n = 0;
  dr_t  [N-1:0] d = '0, q;
  logic [N-1:0] en = '0;
  logic         cd;
  int           checks = 0, failures = 0;

  dr_latch_cd #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .d(d), .en(en), .q(q), .cd(cd));

  always #5 clk = ~clk;

  function automatic dr_t [N-1:0] enc(logic [N-1:0] v);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = '{t: v[i], f: ~v[i]};
    return r;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (q=%h cd=%b)", msg, q, cd); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(q == '0 && cd == 0, "empty after reset");
    for (int it = 0; it < 20; it++) begin
      v = N'($urandom);
      // enable only the low half: the high half must stay NULL
      d  = enc(v);
      en = {{(N/2){1'b0}}, {(N/2){1'b1}}};
      repeat (2) @(negedge clk);
      check(q[N/2-1:0] == enc(v)[N/2-1:0], "low half captured");
      check(q[N-1:N/2] == '0, "high half waits for enable");
      check(cd == 0, "cd stays low while half full");
      // enable all
      en = '1;
      repeat (2) @(negedge clk);
      check(q == enc(v), "all bits captured");
      check(cd == 1, "cd high when full");
      // input goes NULL but enable still 1: hold
      d = '0;
      repeat (2) @(negedge clk);
      check(q == enc(v), "valid data held");
      // enable 0, input valid again: wait for NULL
      d  = enc(v);
      en = '0;
      repeat (2) @(negedge clk);
      check(q == enc(v) && cd == 1, "waits for NULL");
      d = '0;
      repeat (2) @(negedge clk);
      check(q == '0, "emptied");
      check(cd == 0, "cd low when empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
