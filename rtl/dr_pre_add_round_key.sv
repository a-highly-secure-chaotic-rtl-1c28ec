// Pre-round AddRoundKey, dual-rail.
//
// XORs the dual-rail plaintext with the dual-rail cipher key, giving the
// state that enters the first round; the key itself goes on unchanged to
// the R2 ring.  Each output bit is NULL until both its plaintext and key
// bits are valid, so the randomized release of the input bits carries
// through to this first key-dependent operation.  Built from 128 dr_cell
// instances set to XOR.  Purely combinational.
module dr_pre_add_round_key
  import aes_dr_pkg::*;
(
  input  dr_block_t pt,
  input  dr_block_t key,
  output dr_block_t state
);
  for (genvar i = 0; i < 128; i++) begin : g_xor
    dr_cell u_xor (.gate(G_XOR), .a(pt[i]), .b(key[i]), .y(state[i]));
  end
endmodule
