// Testbench of the Muller C-element: random input sequences against a
// model that rises on all ones, falls on all zeros and otherwise holds,
// one clock later.
module tb_muller_c;
  logic       clk = 0, rst_n = 0;
  logic [2:0] in = '0;
  logic       out, model;
  int         checks = 0, failures = 0;

  muller_c #(.N(3), .RESET_VAL(1'b1)) dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (out !== 1'b1) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    model = 1'b1;
    for (int i = 0; i < 400; i++) begin
      in = 3'($urandom);
      if ($urandom % 4 == 0) in = '0;
      if ($urandom % 4 == 0) in = '1;
      @(negedge clk);
      if (in == 3'b111) model = 1'b1;
      else if (in == 3'b000) model = 1'b0;
      checks++;
      if (out !== model) begin failures++; $display("in=%b out=%b model=%b", in, out, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
