// Testbench of the chaotic sequence generator.  A reference model of the
// fixed-point logistic map, written with 64-bit integer arithmetic, is
// stepped alongside; the state must match at every step, a second load must
// be ignored, the state must hold without `step`, and two seeds that differ
// in one bit must give sequences that differ in many bits after 32 steps.
module tb_chaotic_map;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = '0, key = '0, x;
  int          checks = 0, failures = 0;

  chaotic_map dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .key(key), .step(step), .x(x));

  always #5 clk = ~clk;

  function automatic logic [31:0] model(logic [31:0] xv, logic [31:0] kv);
    longint unsigned y, ky, nx;
    y  = (longint'(xv) * (64'h1_0000_0000 - longint'(xv))) >> 32;
    ky = (longint'(kv[7:0]) * y) >> 10;
    nx = 4 * y - ky;
    if (nx >= 64'h1_0000_0000) return 32'hffff_ffff;
    if (nx == 0) return kv | 32'd1;
    return 32'(nx);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seq(input logic [31:0] s, input logic [31:0] k, output logic [31:0] last);
    logic [31:0] m;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    key   = k;
    seed  = s;
    load  = 1;
    @(negedge clk);
    load = 0;
    m = s;
    checks++;
    if (x != m) begin failures++; $display("seed not loaded"); end
    // a second load is ignored
    seed = ~s;
    load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (x != m) begin failures++; $display("second load taken"); end
    for (int i = 0; i < 32; i++) begin
      step = 1;
      @(negedge clk);
      step = 0;
      m = model(m, k);
      checks++;
      if (x != m) begin failures++; $display("step %0d: %h expected %h", i, x, m); end
      checks++;
      if (x == 0) begin failures++; $display("state collapsed to 0"); end
    end
    @(negedge clk);
    checks++;
    if (x != m) begin failures++; $display("state moved without step"); end
    last = x;
  endtask

  initial begin
    logic [31:0] a, b;
    seq(32'h1234_5678, 32'h0000_0031, a);
    seq(32'h1234_5679, 32'h0000_0031, b);
    checks++;
    if ($countones(a ^ b) < 4) begin failures++; $display("no sensitivity to the seed"); end
    seq(32'h8000_0000, 32'h0000_0000, a);  // x = 1/2 with r = 4 saturates
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
