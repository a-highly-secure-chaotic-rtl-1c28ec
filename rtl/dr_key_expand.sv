// Dual-rail AES-128 key expansion step (the R2 ring's logic).
//
// From round key k(r-1) and the round's Rcon byte it forms k(r):
//   t  = SubWord(RotWord(w3)) xor {rcon, 0, 0, 0}
//   w0' = w0 xor t, w1' = w1 xor w0', w2' = w2 xor w1', w3' = w3 xor w2'
// with four zero-value compensated S-boxes and dual-rail XOR cells, so the
// output is NULL until key and Rcon are valid.  w0 is bits 127:96.
// Purely combinational.
module dr_key_expand
  import aes_dr_pkg::*;
(
  input  dr_block_t k,
  input  dr_byte_t  rcon,
  output dr_block_t y
);
  dr_word_t w0, w1, w2, w3, rot, sub, t, n0, n1, n2, n3;

  assign w0  = k[127:96];
  assign w1  = k[95:64];
  assign w2  = k[63:32];
  assign w3  = k[31:0];
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    dr_zv_sbox u_sbox (
      .x (rot[8*b +: 8]),
      .y (sub[8*b +: 8])
    );
  end

  always_comb begin
    t  = {dr_xor8(sub[31:24], rcon), sub[23:0]};
    n0 = dr_xor32(w0, t);
    n1 = dr_xor32(w1, n0);
    n2 = dr_xor32(w2, n1);
    n3 = dr_xor32(w3, n2);
  end

  assign y = {n0, n1, n2, n3};
endmodule
