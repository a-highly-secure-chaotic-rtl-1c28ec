// Timing-boundary-free (TBF) input arrival-time randomizer.
//
// Four delay randomizers A, B, C and D each delay the same handshake signal
// `lack_in` by their own random number of unit delays (1..DEPTH), taken from
// one byte of the 32-bit control word: ctrl[7:0] drives A, ctrl[15:8] B,
// ctrl[23:16] C and ctrl[31:24] D (each byte taken modulo DEPTH).  The outputs rel[0..3] = A..D are wired to groups of latch bits,
// which therefore release their data at four different random times; see
// aes_dr_pkg::grp_of for the bit-to-group wiring.  Timing: rel[g] follows
// lack_in after ctrl byte g (mod DEPTH) + 1 clocks of the unit-delay clock.
// Four randomizers and their depth follow the document; the byte-per-
// randomizer split of the control word is this design's choice.
module tbf_randomizer
  import aes_dr_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                lack_in,
  input  logic [31:0]         ctrl,
  output logic [N_GROUPS-1:0] rel
);
  localparam int unsigned SEL_W = $clog2(DEPTH);

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_rnd
    delay_randomizer #(.DEPTH(DEPTH)) u_dly (
      .clk     (clk),
      .rst_n   (rst_n),
      .lack_in (lack_in),
      .sel     (SEL_W'(ctrl[8*g +: 8] % DEPTH)),
      .out     (rel[g])
    );
  end
endmodule
