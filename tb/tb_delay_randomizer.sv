// Testbench of the delay randomizer at its default depth (64): for random
// and extreme select values the output must rise exactly sel+1 clocks after
// the input rises and fall exactly sel+1 clocks after it falls.
module tb_delay_randomizer;
  logic       clk = 0, rst_n = 0, lack_in = 0, out;
  logic [5:0] sel = '0;
  int         checks = 0, failures = 0;

  delay_randomizer dut (.clk(clk), .rst_n(rst_n), .lack_in(lack_in), .sel(sel), .out(out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic level, input int exp_delay);
    int n = 0;
    @(negedge clk);
    lack_in = level;
    while (out != level && n < 200) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != exp_delay) begin
      failures++;
      $display("sel=%0d edge to %0b after %0d clocks, expected %0d", sel, level, n, exp_delay);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      sel = (i == 0) ? 6'd0 : (i == 1) ? 6'd63 : 6'($urandom);
      repeat (70) @(negedge clk);
      measure(1'b1, sel + 1);
      repeat (70) @(negedge clk);
      measure(1'b0, sel + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
