// Zero-value compensated composite-field S-box, dual-rail.
//
// The AES S-box is computed as an inversion in GF((2^4)^2) followed by the
// affine transform, every gate a dual-rail cell.  A plain composite-field
// S-box leaks when its input is zero, because the inner GF(2^4) values then
// become zero as well.  Two multiplexers remove that case:
//   1. when the input x is 0 the first mux feeds the dummy value p = 0x08
//      into the inversion instead, so no internal node carries zero;
//   2. the second mux sits after the GF(2^4) inverter.  For a zero input it
//      waits until the inverter outputs q = 0x1 (the inverter output for p)
//      and then hands on the correct value 0 in its place; for any other
//      input it passes the inverter output through.
// Data path: delta (isomorphism) -> split into high/low nibbles h, l ->
// d = lambda*h^2 xor (h xor l)*l -> d^-1 -> mux 2 -> h*d^-1, (h xor l)*d^-1
// -> delta^-1 -> affine.  The output is NULL while the input is NULL and is
// valid once the input is.  Purely combinational.
// The structure and p = 8, q = 1 follow the document; the field polynomials
// and isomorphism (see aes_dr_pkg) are this design's choice, under which
// the same p gives the same q.
module dr_zv_sbox
  import aes_dr_pkg::*;
(
  input  dr_byte_t x,
  output dr_byte_t y
);
  localparam logic [3:0][3:0] SQ_COLS  = cols_square();
  localparam logic [3:0][3:0] LAM_COLS = cols_lambda();
  localparam logic [7:0][7:0] AFF_COLS = cols_affine();

  dr_t      nz, z;
  logic     inv_is_q;
  dr_byte_t xin, xd, yd, aff;
  dr_nib_t  h, l, hl, hsql, m, d, dinv, dsel, hn, ln;

  always_comb begin
    // Zero detect: OR tree of dual-rail cells, then inverted.
    nz = x[0];
    for (int i = 1; i < 8; i++) nz = dr_gate(G_OR, nz, x[i]);
    z = dr_not(nz);

    // Mux 1: dummy value p for a zero input.
    for (int i = 0; i < 8; i++) xin[i] = dr_mux(z, dr_enc(ZV_P[i]), x[i]);

    xd   = dr_lin8(DELTA_COLS, xin);
    h    = xd[7:4];
    l    = xd[3:0];
    hl   = dr_xor4(h, l);
    hsql = dr_lin4(LAM_COLS, dr_lin4(SQ_COLS, h));
    m    = dr_gf4_mul(hl, l);
    d    = dr_xor4(hsql, m);
    dinv = dr_gf4_inv(d);

    // Mux 2: for a zero input wait for q, then pass a valid 0.
    inv_is_q = 1'b1;
    for (int i = 0; i < 4; i++) inv_is_q &= ZV_Q[i] ? dinv[i].t : dinv[i].f;
    for (int i = 0; i < 4; i++)
      dsel[i] = '{t: z.f & dinv[i].t,
                  f: (z.f & dinv[i].f) | (z.t & inv_is_q)};

    hn  = dr_gf4_mul(h, dsel);
    ln  = dr_gf4_mul(hl, dsel);
    yd  = dr_lin8(DINV_COLS, {hn, ln});
    aff = dr_lin8(AFF_COLS, yd);
    y   = dr_xor8_const(aff, AFFINE_C);
  end
endmodule
