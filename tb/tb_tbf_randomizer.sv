// Testbench of the TBF input arrival-time randomizer: with a random control
// word, each of the outputs A..D must rise (ctrl byte mod 64) + 1 clocks
// after the input rises, so the four groups are released independently.
module tb_tbf_randomizer;
  logic        clk = 0, rst_n = 0, lack_in = 0;
  logic [31:0] ctrl = '0;
  logic [3:0]  rel;
  int          checks = 0, failures = 0;

  tbf_randomizer dut (.clk(clk), .rst_n(rst_n), .lack_in(lack_in), .ctrl(ctrl), .rel(rel));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_rise [4];
    for (int it = 0; it < 20; it++) begin
      rst_n   = 0;
      lack_in = 0;
      ctrl    = $urandom;
      repeat (2) @(negedge clk);
      rst_n = 1;
      lack_in = 1;
      for (int g = 0; g < 4; g++) t_rise[g] = -1;
      for (int n = 1; n <= 80; n++) begin
        @(negedge clk);
        for (int g = 0; g < 4; g++) if (rel[g] && t_rise[g] < 0) t_rise[g] = n;
      end
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (t_rise[g] != int'(ctrl[8*g +: 6]) + 1) begin
          failures++;
          $display("ctrl=%h group %0d rose after %0d", ctrl, g, t_rise[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
