// Dual-rail AES MixColumns.
//
// Each 32-bit column (a0, a1, a2, a3) becomes
//   b_r = 2*a_r xor 3*a_(r+1) xor a_(r+2) xor a_(r+3),
// built from dual-rail xtime and XOR cells, so the output is NULL while
// the input is NULL.  Byte k of the 128-bit state is bits [127-8k -: 8]
// (FIPS-197 order); column c holds bytes 4c..4c+3.  Purely combinational.
module dr_mix_columns
  import aes_dr_pkg::*;
(
  input  dr_block_t s,
  output dr_block_t y
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      dr_byte_t a [4];
      dr_byte_t t [4];
      for (int r = 0; r < 4; r++) begin
        a[r] = s[127 - 8*(4*c + r) -: 8];
        t[r] = dr_xtime(a[r]);
      end
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] =
          dr_xor8(dr_xor8(t[r], dr_xor8(t[(r+1)%4], a[(r+1)%4])),
                  dr_xor8(a[(r+2)%4], a[(r+3)%4]));
    end
  end
endmodule
