// Delay randomizer: a chain of DEPTH unit delays and a mux tree.
//
// The handshake input `lack_in` runs down a series of DEPTH delay cells
// (taps DLY1..DLY<DEPTH>); the mux tree picks tap sel+1, so the output
// follows the input after 1 to DEPTH unit delays as chosen by the random
// control word `sel`.  In the FPGA each unit is one LUT used as a buffer;
// here each unit is one flip-flop of the fast unit-delay clock, which makes
// the delay exact and simulable.  `sel` must only change while the chain
// holds a constant value, or the output can glitch.  Synchronous
// active-low reset clears the chain.
// DEPTH = 64 and the 1..64 delay range follow the document; the flip-flop
// delay cell is this design's choice.
module delay_randomizer #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned SEL_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lack_in,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);
  logic [DEPTH-1:0] dly;  // dly[k] is tap DLY<k+1>

  always_ff @(posedge clk) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[DEPTH-2:0], lack_in};
  end

  // Mux tree over the taps; a select beyond DEPTH-1 takes the last tap.
  always_comb begin
    if (32'(sel) < DEPTH) out = dly[sel];
    else                  out = dly[DEPTH-1];
  end
endmodule
