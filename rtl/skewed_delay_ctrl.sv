// Skewed-delay controller (sdc) around the in-core TBF randomizer.
//
// Random delays are worth their latency only where side-channel attacks
// look, the first and the last two AES rounds.  A state machine counts the
// Lack handshakes; when the count equals DLY_R0, DLY_R1 or DLY_R2 the
// randomizer is enabled, otherwise it is bypassed:
//   - the stabilizing mux feeds Lack into the delay chain when enabled and
//     ground when bypassed, so the chain's inner nodes stay quiet;
//   - the bypass mux hands each latch group either its randomized release
//     (rack[g] = delayed Lack) or Lack itself with no delay.
// Interface: lack is the Stage 1 handshake, ctrl the randomizer control
// word, rack[3:0] the per-group releases A..D, dcnt the round count and
// delay_on whether the current round is delayed.  The mode changes one
// clock after a falling edge of Lack.
// The structure (state machine, two muxes, rounds 1, 9 and 10 delayed)
// follows the document; the count encoding is this design's choice.
module skewed_delay_ctrl
  import aes_dr_pkg::*;
#(
  parameter int unsigned DEPTH  = 64,
  parameter logic [3:0]  DLY_R0 = 4'd1,
  parameter logic [3:0]  DLY_R1 = 4'd9,
  parameter logic [3:0]  DLY_R2 = 4'd10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                lack,
  input  logic [31:0]         ctrl,
  output logic [N_GROUPS-1:0] rack,
  output logic [3:0]          dcnt,
  output logic                delay_on
);
  logic                stab;
  logic [N_GROUPS-1:0] dly;

  sdc_state_machine u_sm (
    .clk   (clk),
    .rst_n (rst_n),
    .ip    (lack),
    .count (dcnt)
  );

  assign delay_on = (dcnt == DLY_R0) || (dcnt == DLY_R1) || (dcnt == DLY_R2);

  // Stabilizing mux.
  assign stab = delay_on ? lack : 1'b0;

  tbf_randomizer #(.DEPTH(DEPTH)) u_iatr (
    .clk     (clk),
    .rst_n   (rst_n),
    .lack_in (stab),
    .ctrl    (ctrl),
    .rel     (dly)
  );

  // Bypass mux.
  assign rack = delay_on ? dly : {N_GROUPS{lack}};
endmodule
