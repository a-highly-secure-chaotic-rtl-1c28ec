// Testbench of the Rcon state machine: walks the constant sequence
// 01..36 and checks the next constant, the last-round flag (only at 36)
// and the stop (only when the held constant is 6C).
module tb_dr_rcon_fsm;
  import aes_dr_pkg::*;
  import tb_util_pkg::*;

  dr_byte_t rcon, held, nxt;
  dr_t      last;
  logic     stop;
  int checks = 0, failures = 0;

  dr_rcon_fsm dut (.rcon(rcon), .rcon_held(held), .rcon_next(nxt), .last(last), .stop(stop));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seq [11] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36, 8'h6c};
    logic [7:0] got;
    bit ok;
    rcon = '0;
    held = '0;
    #1;
    checks++;
    if (nxt != '0 || last != '0 || stop) begin failures++; $display("NULL not propagated"); end
    for (int r = 0; r < 10; r++) begin
      rcon = enc8(seq[r]);
      held = enc8(seq[r]);
      #1;
      ok = dec8(nxt, got);
      checks++;
      if (!ok || got != seq[r+1]) begin failures++; $display("rcon %02x -> %02x", seq[r], got); end
      checks++;
      if (last.t != (r == 9) || last.f != (r != 9)) begin failures++; $display("last flag wrong at %02x", seq[r]); end
      checks++;
      if (stop) begin failures++; $display("early stop at %02x", seq[r]); end
    end
    held = enc8(8'h6c);
    #1;
    checks++;
    if (!stop) begin failures++; $display("no stop at 6c"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
