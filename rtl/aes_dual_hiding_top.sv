// Dual-hiding asynchronous-logic AES-128 accelerator, top level.
//
// The accelerator encrypts one 128-bit block with a 128-bit key and hides
// its power signature two ways: vertically, by computing on dual-rail data
// (every bit switches exactly one rail per valid/NULL phase, whatever its
// value) with a zero-value compensated S-box; horizontally, by randomizing
// when data enter the logic, with a TBF input arrival-time randomizer in
// front of the pre-round key addition and a second one, behind a
// skewed-delay controller, at the Stage 1 latches of the round ring.
//
// Blocks: synchronous interface (input/output flip-flops and state
// machines, clock `clk`) -> pre-round randomizer and single- to dual-rail
// conversion -> asynchronous core (three rings R1-R3 of latches with
// completion detection, clock `uclk`).  A chaotic map, stepped once per
// `clk` cycle while an encryption runs and keyed by the cipher key, is
// XORed into the randomizer control word at every start.
//
// Clocks: `clk` is the system clock; the core finishes within 14 `clk`
// cycles only if `uclk`, the unit-delay clock that models the self-timed
// circuit, is fast enough.  One encryption takes 137 `uclk` cycles with
// the shortest randomizer delays and about 140 + 5*(DEPTH-1) with the
// longest (about 455 at DEPTH = 64), so `clk` must be at least about 40
// `uclk` periods.  `late` reports a capture before the core was done.
// Handshake: pulse `start` with plaintext, key and ctrl while `busy` is 0;
// `done` pulses 14 `clk` cycles later with `ciphertext` valid.
// Asynchronous active-low reset `rst_n`, held for a few cycles of both
// clocks.  core_round, core_delay_on and core_ring_closed show the
// skewed-delay controller's round count, whether the current round is
// randomized, and whether the rings have closed.
module aes_dual_hiding_top
  import aes_dr_pkg::*;
#(
  parameter int unsigned DEPTH       = 64,
  parameter int unsigned WAIT_CYCLES = 14
) (
  input  logic         clk,
  input  logic         uclk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  input  logic [31:0]  ctrl,
  output logic         busy,
  output logic         done,
  output logic         late,
  output logic [127:0] ciphertext,
  // core status, for observation only (unit-delay clock domain)
  output logic [3:0]   core_round,
  output logic         core_delay_on,
  output logic         core_ring_closed
);
  logic         run;
  logic [127:0] pt_q, key_q, core_ct;
  logic [31:0]  ctrl_q, chaos, key_fold;
  logic         core_done;
  logic [1:0]   run_sync;
  logic         core_rst_n;
  logic [N_GROUPS-1:0] pre_rel;
  dr_block_t    pt_dr, key_dr;
  dr_byte_t     rcon_dr;

  // ----------------------------------------------- synchronous side
  aes_sync_if #(.WAIT_CYCLES(WAIT_CYCLES)) u_sync (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .pt_in      (plaintext),
    .key_in     (key),
    .ctrl_in    (ctrl),
    .rnd_in     (chaos),
    .busy       (busy),
    .done       (done),
    .late       (late),
    .ciphertext (ciphertext),
    .run        (run),
    .pt_q       (pt_q),
    .key_q      (key_q),
    .ctrl_q     (ctrl_q),
    .core_done  (core_done),
    .core_ct    (core_ct)
  );

  assign key_fold = key_q[127:96] ^ key_q[95:64] ^ key_q[63:32] ^ key_q[31:0];

  chaotic_map u_chaos (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start & ~busy),
    .seed  (ctrl),
    .key   (key_fold),
    .step  (run),
    .x     (chaos)
  );

  // ---------------------------------------------- asynchronous side
  // `run` enters the unit-delay clock domain through two flip-flops; the
  // core is held in reset while it is low.
  always_ff @(posedge uclk or negedge rst_n) begin
    if (!rst_n) run_sync <= '0;
    else        run_sync <= {run_sync[0], run};
  end
  assign core_rst_n = run_sync[1];

  tbf_randomizer #(.DEPTH(DEPTH)) u_pre_rnd (
    .clk     (uclk),
    .rst_n   (core_rst_n),
    .lack_in (core_rst_n),
    .ctrl    (ctrl_q),
    .rel     (pre_rel)
  );

  s2dr_convert #(.N(128)) u_s2dr_pt (
    .din  (pt_q),
    .rel  (pre_rel),
    .dout (pt_dr)
  );

  s2dr_convert #(.N(128)) u_s2dr_key (
    .din  (key_q),
    .rel  (pre_rel),
    .dout (key_dr)
  );

  s2dr_convert #(.N(8)) u_s2dr_rcon (
    .din  (RCON_FIRST),
    .rel  (pre_rel),
    .dout (rcon_dr)
  );

  aes_async_core #(.DEPTH(DEPTH)) u_core (
    .clk       (uclk),
    .rst_n     (core_rst_n),
    .pt        (pt_dr),
    .key       (key_dr),
    .rcon0     (rcon_dr),
    .ctrl      (ctrl_q),
    .ct        (core_ct),
    .done      (core_done),
    .round_cnt (core_round),
    .delay_on  (core_delay_on),
    .ring_mode (core_ring_closed)
  );
endmodule
