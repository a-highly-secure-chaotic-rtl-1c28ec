// Testbench of the single- to dual-rail conversion: for random data and
// every release pattern, bit i must be the valid pair of data bit i when
// its group (i mod 4) is released and NULL otherwise.
module tb_s2dr_convert;
  import aes_dr_pkg::*;

  logic [127:0] din;
  logic [3:0]   rel;
  dr_block_t    dout;
  int           checks = 0, failures = 0;

  s2dr_convert #(.N(128)) dut (.din(din), .rel(rel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20; it++)
      for (int r = 0; r < 16; r++) begin
        automatic bit ok = 1;
        din = {$urandom, $urandom, $urandom, $urandom};
        rel = 4'(r);
        #1;
        for (int i = 0; i < 128; i++) begin
          if (rel[i % 4]) ok &= (dout[i].t == din[i]) && (dout[i].f == !din[i]);
          else            ok &= (dout[i] == '0);
        end
        checks++;
        if (!ok) begin failures++; $display("rel=%b mismatch", rel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
