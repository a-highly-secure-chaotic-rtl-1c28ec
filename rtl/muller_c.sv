// N-input Muller C-element.
//
// The output rises when every input is 1, falls when every input is 0 and
// otherwise keeps its value.  In the accelerator it joins the Lack signals
// of the three rings at Stage 1 so that the AES data, the round key and the
// Rcon all advance together.  The asynchronous core is modelled on the fast
// unit-delay clock `clk`: the state-holding element is a flip-flop, so the
// gate delay is one clock.  Synchronous active-low reset to RESET_VAL.
module muller_c #(
  parameter int unsigned N         = 3,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);
  always_ff @(posedge clk) begin
    if (!rst_n)        out <= RESET_VAL;
    else if (&in)      out <= 1'b1;
    else if (~|in)     out <= 1'b0;
  end
endmodule
