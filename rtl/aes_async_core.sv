// Asynchronous-logic AES-128 core: three rings of dual-rail latches.
//
// Ring R1 carries the AES state, R2 the round key and R3 the round
// constant.  Each ring has three Latch+CD stages; the round logic sits
// between Stage 1 and Stage 2 (R1: S-box/ShiftRows/MixColumns/AddRoundKey,
// R2: key expansion, R3: Rcon state machine) and Stage 2 -> Stage 3 ->
// Stage 1 closes the ring.  A four-phase valid/NULL handshake moves the
// data: a latch's Lack is the inverse of the next latch's completion, so it
// takes valid data while the next latch is empty and NULL while the next
// latch is full.  One valid token plus one NULL going round a ring is one
// AES round.  The Lack of Stage 1 is shared by the three rings through a
// Muller C-gate, so state, key and Rcon advance in step.
//
// Start: after reset every latch is NULL and the Stage 1 muxes select the
// pre-round AddRoundKey result, the cipher key and the first Rcon (the
// dual-rail inputs, released by the pre-round randomizer).  Once all three
// Stage 1 latches hold valid data the muxes switch to Stage 3 and the rings
// close.  The R1 Stage 1 latch bits are released through the skewed-delay
// controller (four groups, random delays in rounds 1, 9 and 10).
// Stop: when the Rcon after the tenth round reaches R3 Stage 2, each Stage 3
// latch, once it has handed its data to Stage 1 and returned to NULL, takes
// no new data; the ciphertext then stays in the R1 Stage 2
// latch, `ct` carries its true rails and `done` is 1.
//
// Interface: all inputs must be stable from reset release to `done`.
// Timing: `clk` is the fast unit-delay clock that models gate and latch
// delays; synchronous active-low reset `rst_n` returns the core to its
// start state.  An encryption takes roughly 80 clocks plus the random
// delays.  The ring structure, Muller C-gate synchronisation and stop
// condition follow the document; modelling the self-timed circuit on a
// unit-delay clock is this design's choice.
module aes_async_core
  import aes_dr_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dr_block_t      pt,
  input  dr_block_t      key,
  input  dr_byte_t       rcon0,
  input  logic [31:0]    ctrl,
  output logic [127:0]   ct,
  output logic           done,
  output logic [3:0]     round_cnt,
  output logic           delay_on,
  output logic           ring_mode
);
  dr_block_t s0;
  dr_block_t r1_d1, r1_q1, r1_d2, r1_q2, r1_q3;
  dr_block_t r2_d1, r2_q1, r2_d2, r2_q2, r2_q3;
  dr_byte_t  r3_d1, r3_q1, r3_d2, r3_q2, r3_q3;
  logic      r1_cd1, r1_cd2, r1_cd3;
  logic      r2_cd1, r2_cd2, r2_cd3;
  logic      r3_cd1, r3_cd2, r3_cd3;
  logic      lack1, stop, halt, halting;
  logic [N_GROUPS-1:0] rack;
  logic [127:0]        r1_en1;
  dr_t                 last;

  // ---------------------------------------------------- pre-round and muxes
  dr_pre_add_round_key u_pre_ark (
    .pt    (pt),
    .key   (key),
    .state (s0)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                          ring_mode <= 1'b0;
    else if (r1_cd1 && r2_cd1 && r3_cd1) ring_mode <= 1'b1;
  end

  assign r1_d1 = ring_mode ? r1_q3 : s0;
  assign r2_d1 = ring_mode ? r2_q3 : key;
  assign r3_d1 = ring_mode ? r3_q3 : rcon0;

  // ------------------------------------------------- Stage 1 handshake
  muller_c #(.N(3), .RESET_VAL(1'b1)) u_cgate (
    .clk   (clk),
    .rst_n (rst_n),
    .in    ({~r1_cd2, ~r2_cd2, ~r3_cd2}),
    .out   (lack1)
  );

  skewed_delay_ctrl #(.DEPTH(DEPTH)) u_sdc (
    .clk      (clk),
    .rst_n    (rst_n),
    .lack     (lack1),
    .ctrl     (ctrl),
    .rack     (rack),
    .dcnt     (round_cnt),
    .delay_on (delay_on)
  );

  always_comb
    for (int i = 0; i < 128; i++) r1_en1[i] = rack[grp_of(i)];

  // ------------------------------------------------------------ Stage 1
  dr_latch_cd #(.N(128)) u_r1_s1 (.clk(clk), .rst_n(rst_n), .d(r1_d1), .en(r1_en1),
                                  .q(r1_q1), .cd(r1_cd1));
  dr_latch_cd #(.N(128)) u_r2_s1 (.clk(clk), .rst_n(rst_n), .d(r2_d1), .en({128{lack1}}),
                                  .q(r2_q1), .cd(r2_cd1));
  dr_latch_cd #(.N(8))   u_r3_s1 (.clk(clk), .rst_n(rst_n), .d(r3_d1), .en({8{lack1}}),
                                  .q(r3_q1), .cd(r3_cd1));

  // ------------------------------------------------------- round logic
  dr_rcon_fsm u_rcon (
    .rcon      (r3_q1),
    .rcon_held (r3_q2),
    .rcon_next (r3_d2),
    .last      (last),
    .stop      (stop)
  );

  dr_key_expand u_kexp (
    .k    (r2_q1),
    .rcon (r3_q1),
    .y    (r2_d2)
  );

  dr_round u_round (
    .s    (r1_q1),
    .rk   (r2_d2),
    .last (last),
    .y    (r1_d2)
  );

  // ------------------------------------------------------------ Stage 2
  dr_latch_cd #(.N(128)) u_r1_s2 (.clk(clk), .rst_n(rst_n), .d(r1_d2), .en({128{~r1_cd3}}),
                                  .q(r1_q2), .cd(r1_cd2));
  dr_latch_cd #(.N(128)) u_r2_s2 (.clk(clk), .rst_n(rst_n), .d(r2_d2), .en({128{~r2_cd3}}),
                                  .q(r2_q2), .cd(r2_cd2));
  dr_latch_cd #(.N(8))   u_r3_s2 (.clk(clk), .rst_n(rst_n), .d(r3_d2), .en({8{~r3_cd3}}),
                                  .q(r3_q2), .cd(r3_cd2));

  // ------------------------------------------------------------ Stage 3
  // After the stop a Stage 3 latch still hands the data it holds on to
  // Stage 1, then goes NULL and takes no new data.
  assign halting = halt | stop;

  always_ff @(posedge clk) begin
    if (!rst_n)    halt <= 1'b0;
    else if (stop) halt <= 1'b1;
  end

  dr_latch_cd #(.N(128)) u_r1_s3 (.clk(clk), .rst_n(rst_n), .d(r1_q2),
                                  .en({128{ring_mode & ~r1_cd1 & ~(halting & ~r1_cd3)}}), .q(r1_q3), .cd(r1_cd3));
  dr_latch_cd #(.N(128)) u_r2_s3 (.clk(clk), .rst_n(rst_n), .d(r2_q2),
                                  .en({128{ring_mode & ~r2_cd1 & ~(halting & ~r2_cd3)}}), .q(r2_q3), .cd(r2_cd3));
  dr_latch_cd #(.N(8))   u_r3_s3 (.clk(clk), .rst_n(rst_n), .d(r3_q2),
                                  .en({8{ring_mode & ~r3_cd1 & ~(halting & ~r3_cd3)}}), .q(r3_q3), .cd(r3_cd3));

  // ------------------------------------------------------------- output
  always_comb
    for (int i = 0; i < 128; i++) ct[i] = r1_q2[i].t;

  assign done = halt & r1_cd2;
endmodule
