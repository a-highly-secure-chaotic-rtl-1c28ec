// Synchronous interface: input-output flip-flops and sync-logic state
// machines.
//
// The accelerator is globally synchronous, locally asynchronous.  On
// `start` (accepted while `busy` is 0) the input flip-flops take the
// plaintext, the key and the randomizer control word (ctrl_in xor rnd_in,
// where rnd_in is the chaotic sequence), and `run` releases the core.
// On the WAIT_CYCLES-th rising edge after the one that took `start`, the
// output flip-flops take the ciphertext from the core, `run` drops (which
// resets the core) and `done` pulses for one cycle, with `ciphertext` valid
// from then on.  A new `start` is accepted on the next edge.  The core is
// assumed to finish within that window; `late` is set with `done` when the
// core's own completion flag, brought into this clock domain by a
// two-flop synchronizer, was not yet up at capture.
// Asynchronous active-low reset.  The 14-cycle window follows the
// document; the start/busy/done handshake and the late flag are this
// design's choices.
module aes_sync_if #(
  parameter int unsigned WAIT_CYCLES = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  // host side
  input  logic         start,
  input  logic [127:0] pt_in,
  input  logic [127:0] key_in,
  input  logic [31:0]  ctrl_in,
  input  logic [31:0]  rnd_in,
  output logic         busy,
  output logic         done,
  output logic         late,
  output logic [127:0] ciphertext,
  // core side
  output logic         run,
  output logic [127:0] pt_q,
  output logic [127:0] key_q,
  output logic [31:0]  ctrl_q,
  input  logic         core_done,
  input  logic [127:0] core_ct
);
  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e      state;
  logic [4:0]  cnt;
  logic [1:0]  done_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_sync <= '0;
    else        done_sync <= {done_sync[0], core_done};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      pt_q       <= '0;
      key_q      <= '0;
      ctrl_q     <= '0;
      ciphertext <= '0;
      done       <= 1'b0;
      late       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pt_q   <= pt_in;
          key_q  <= key_in;
          ctrl_q <= ctrl_in ^ rnd_in;
          cnt    <= '0;
          state  <= S_RUN;
        end
        default: begin  // S_RUN
          cnt <= cnt + 5'd1;
          if (cnt == 5'(WAIT_CYCLES - 1)) begin
            ciphertext <= core_ct;
            late       <= ~done_sync[1];
            done       <= 1'b1;
            state      <= S_IDLE;
          end
        end
      endcase
    end
  end

  assign run  = (state == S_RUN);
  assign busy = (state != S_IDLE);
endmodule
