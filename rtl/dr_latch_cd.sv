// Dual-rail pipeline latch with completion detection (Latch + CD).
//
// Each rail of each bit is a C-element of the incoming rail and that bit's
// enable (the Lack handshake, or a randomized copy of it).  With the enable
// at 1 the bit waits for valid data and then holds it; with the enable at 0
// it waits for NULL and then holds NULL.  Because every bit has its own
// enable, a delay randomizer can release groups of bits at different times.
// The completion detector `cd` goes to 1 when every bit of the latch holds
// valid data, to 0 when every bit holds NULL, and keeps its value in
// between; the previous stage uses ~cd as its Lack.
// Timing: the model runs on the unit-delay clock; a latch bit and the
// completion detector each take one clock.  Synchronous active-low reset
// empties the latch (all NULL, cd = 0).
module dr_latch_cd
  import aes_dr_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dr_t  [N-1:0] d,
  input  logic [N-1:0] en,
  output dr_t  [N-1:0] q,
  output logic         cd
);
  logic all_valid, all_null;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (d[i].t == en[i]) q[i].t <= en[i];
        if (d[i].f == en[i]) q[i].f <= en[i];
      end
    end
  end

  always_comb begin
    all_valid = 1'b1;
    all_null  = 1'b1;
    for (int i = 0; i < N; i++) begin
      all_valid &= dr_is_valid(q[i]);
      all_null  &= dr_is_null(q[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         cd <= 1'b0;
    else if (all_valid) cd <= 1'b1;
    else if (all_null)  cd <= 1'b0;
  end
endmodule
