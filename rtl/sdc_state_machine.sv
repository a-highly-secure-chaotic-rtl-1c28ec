// Round counter of the skewed-delay controller.
//
// Counts the handshakes of the Stage 1 Lack signal `ip`: `count` is 1 after
// reset and steps up on every falling edge of `ip`, so count = r while the
// latches are released with the input of AES round r.  Counting on the
// falling edge means the controller only changes mode while Lack is 0, when
// the delay chain holds zeros, so no glitch reaches the latches.  The count
// saturates at 15.  Synchronous active-low reset.
module sdc_state_machine (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ip,
  output logic [3:0] count
);
  logic ip_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ip_q  <= 1'b0;
      count <= 4'd1;
    end else begin
      ip_q <= ip;
      if (ip_q && !ip && count != 4'd15) count <= count + 4'd1;
    end
  end
endmodule
