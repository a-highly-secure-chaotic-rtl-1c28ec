// Single-rail to dual-rail conversion with randomized release.
//
// Bit i of the single-rail input leaves as a dual-rail pair once its group's
// release signal rel[grp_of(i)] is 1, and as NULL before; the releases come
// from the pre-round TBF randomizer, so the pre-round key addition sees its
// input bits arrive at four random times.  Inputs must be stable while any
// release is 1.  Purely combinational.
// The conversion follows the document; gating it with the pre-round
// randomizer outputs is how this design applies that randomizer.
module s2dr_convert
  import aes_dr_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]        din,
  input  logic [N_GROUPS-1:0] rel,
  output dr_t  [N-1:0]        dout
);
  always_comb
    for (int i = 0; i < N; i++)
      dout[i] = rel[grp_of(i)] ? dr_enc(din[i]) : DR_NULL;
endmodule
