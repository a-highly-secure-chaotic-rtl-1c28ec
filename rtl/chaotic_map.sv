// Chaotic sequence generator (logistic map in fixed point).
//
// The state x is a 32-bit fraction in [0, 1).  Every clock with `step` = 1
// it is iterated once through the logistic map
//     x <- r * x * (1 - x),   r = 4 - key[7:0] / 1024  (3.75 < r <= 4),
// so the user key sets the map parameter and repeated steps ("multiple
// rounds") spread any difference in the initial bit stream over the whole
// word.  The product is saturated below 1, and a state that collapses to 0
// is re-seeded with key | 1 so that finite precision cannot lock the map.
// `load` with `seed` sets the initial bit stream; only the first `load`
// after reset is taken.  Output `x` is the current state.  Synchronous
// logic with asynchronous active-low reset to SEED.
// The document names a chaotic sequence fed back over several rounds under
// a user key; the choice of the logistic map, its fixed-point form and how
// its output is used are this design's.
module chaotic_map #(
  parameter logic [31:0] SEED = 32'h9E37_79B9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic [31:0] key,
  input  logic        step,
  output logic [31:0] x
);
  logic        seeded;
  logic [31:0] y;          // x(1-x), at most 0.25
  logic [31:0] ky;         // key[7:0] * y / 1024
  logic [33:0] nx;
  logic [31:0] nxt;

  always_comb begin
    y    = 32'(({32'd0, x} * {32'd0, (~x + 32'd1)}) >> 32);
    ky   = 32'(({32'd0, y} * {56'd0, key[7:0]}) >> 10);
    nx   = {y, 2'b00} - {2'd0, ky};
    if (nx[33:32] != 2'b00)  nxt = 32'hFFFF_FFFF;
    else if (nx[31:0] == '0) nxt = key | 32'd1;
    else                     nxt = nx[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x      <= SEED;
      seeded <= 1'b0;
    end else if (load && !seeded) begin
      x      <= (seed == '0) ? SEED : seed;
      seeded <= 1'b1;
    end else if (step) begin
      x <= nxt;
    end
  end
endmodule
