// lfsr_rng: pseudo-random number source.
//
// The AMD encoders need a fresh random symbol x for every codeword and the
// prioritized arbiter draws at random.  The P-Sec proposal does not say how the
// random numbers are produced; this design uses a 32-bit Galois LFSR with
// the maximal-length polynomial x^32 + x^22 + x^2 + x + 1 that advances by
// one step per cycle while en is high.  Reset loads the seed input, which
// each instance ties to its own value; a zero seed is replaced by 1.  A true
// random source can replace it behind the same port.
//
// Ports: seed is the reset value; en advances the register; rnd is the
// current 32-bit state.
module lfsr_rng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        en,
  output logic [31:0] rnd
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= (seed == '0) ? 32'h1 : seed;
    end else if (en) begin
      state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
    end
  end

  assign rnd = state;

endmodule
