// Rcon state machine (the R3 ring's logic).
//
// The R3 ring carries the current round constant as a dual-rail byte.  Per
// round this logic forms the next constant, rcon_next = xtime(rcon), which
// runs 01, 02, 04, ... 80, 1B, 36, and flags the tenth round (rcon = 0x36,
// `last`, dual-rail) so that the round logic skips MixColumns.  When the
// constant after the tenth round (0x6C) arrives in the R3 Stage 2 latch,
// `stop` rises and the core halts its rings with the ciphertext in the R1
// Stage 2 latch.  Purely combinational.  Five of the eight rcon_next bits
// (both rails of bits 0, 2, 5, 6 and 7) are plain wires from rcon bits:
// xtime is a shift with a feedback XOR on bits 1, 3 and 4 only.
// Ten rounds and the stop after the tenth follow the document; the stop
// encoding is this design's choice.
module dr_rcon_fsm
  import aes_dr_pkg::*;
(
  input  dr_byte_t rcon,       // R3 Stage 1 latch
  input  dr_byte_t rcon_held,  // R3 Stage 2 latch
  output dr_byte_t rcon_next,
  output dr_t      last,
  output logic     stop
);
  always_comb begin
    rcon_next    = dr_xtime(rcon);
    last         = dr_eq8_const(rcon, RCON_LAST);
    stop         = 1'b1;
    for (int i = 0; i < 8; i++) stop &= RCON_STOP[i] ? rcon_held[i].t : rcon_held[i].f;
  end
endmodule
