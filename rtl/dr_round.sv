// One dual-rail AES round (the R1 ring's logic between Stage 1 and Stage 2).
//
// SubBytes with sixteen zero-value compensated S-boxes, ShiftRows (a fixed
// byte permutation), MixColumns and AddRoundKey with the round key from the
// key expansion.  In the last round MixColumns is skipped: `last` is a
// dual-rail flag from the Rcon state machine and steers a dual-rail mux, so
// the round output stays NULL until the flag, the state and the key are all
// valid.  Byte order as in FIPS-197 (byte 0 = bits 127:120).  Purely
// combinational.
module dr_round
  import aes_dr_pkg::*;
(
  input  dr_block_t s,
  input  dr_block_t rk,
  input  dr_t       last,
  output dr_block_t y
);
  dr_block_t sb, sr, mc;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    dr_zv_sbox u_sbox (
      .x (s [127 - 8*k -: 8]),
      .y (sb[127 - 8*k -: 8])
    );
  end

  // ShiftRows: row r of column c takes the byte of column c+r.
  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127 - 8*(4*c + r) -: 8] = sb[127 - 8*(4*((c + r) % 4) + r) -: 8];

  dr_mix_columns u_mc (
    .s (sr),
    .y (mc)
  );

  // Last-round bypass of MixColumns, then AddRoundKey.
  always_comb
    for (int i = 0; i < 128; i++)
      y[i] = dr_xor(dr_mux(last, sr[i], mc[i]), rk[i]);
endmodule
