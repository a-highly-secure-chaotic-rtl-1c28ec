// Testbench of the skewed-delay controller: Lack is toggled through twelve
// handshakes with a fixed control word.  In handshakes 1, 9 and 10 each
// rack output must follow Lack's rising edge after (ctrl byte mod 64) + 1
// clocks; in all the others it must follow Lack without delay.  The round
// count must step once per falling edge of Lack, and no rack output may
// ever fall while Lack is high (no glitch on a mode change).
module tb_skewed_delay_ctrl;
  logic        clk = 0, rst_n = 0, lack = 1;
  logic [31:0] ctrl = 32'h0514_2a07;
  logic [3:0]  rack, dcnt;
  logic        delay_on;
  int          checks = 0, failures = 0, glitches = 0;

  skewed_delay_ctrl dut (.clk(clk), .rst_n(rst_n), .lack(lack), .ctrl(ctrl),
                         .rack(rack), .dcnt(dcnt), .delay_on(delay_on));

  always #5 clk = ~clk;

  logic [3:0] rack_q = '0;
  always @(negedge clk) begin
    if (rst_n && lack && ((rack_q & ~rack) != 0)) glitches++;
    rack_q <= rack;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_rise [4];
    bit delayed;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 1; r <= 12; r++) begin
      if (r > 1) begin
        // falling edge starts round r
        lack = 0;
        repeat (80) @(negedge clk);
        checks++;
        if (dcnt != 4'(r)) begin failures++; $display("count %0d in round %0d", dcnt, r); end
        lack = 1;
      end
      delayed = (r == 1) || (r == 9) || (r == 10);
      #1;
      for (int g = 0; g < 4; g++) t_rise[g] = (rack[g] ? 0 : -1);
      for (int n = 1; n <= 80; n++) begin
        @(negedge clk);
        for (int g = 0; g < 4; g++) if (rack[g] && t_rise[g] < 0) t_rise[g] = n;
      end
      checks++;
      if (delay_on != delayed) begin failures++; $display("round %0d delay_on=%0b", r, delay_on); end
      for (int g = 0; g < 4; g++) begin
        automatic int exp_t = delayed ? int'(ctrl[8*g +: 6]) + 1 : 0;
        checks++;
        if (t_rise[g] != exp_t) begin
          failures++;
          $display("round %0d group %0d released after %0d, expected %0d", r, g, t_rise[g], exp_t);
        end
      end
    end
    checks++;
    if (glitches != 0) begin failures++; $display("%0d glitches", glitches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
