// keygen_prng: on-chip pseudo-random residue generator (KeyGen PRNG).
//
// The uniformly random half of each key-switching key can be regenerated
// on chip from a short seed instead of being stored and moved, which
// halves the key traffic.  This unit keeps one 64-bit xorshift state per
// lane (state_l = seed ^ (l+1)*0x9E3779B97F4A7C15 after seed_load, then
// x ^= x<<13; x ^= x>>7; x ^= x<<17 on every cycle with en high) and
// outputs the low W bits of each state reduced once by q.  The output is
// combinational from the state, so the row shown while en is high is the
// row consumed.  Values are uniform mod q up to a bias of (2^W - q)/2^W,
// which is small for the q close to 2^W that the design assumes
// (q > 2^(W-1) is required for a single subtraction to suffice).
// The document lists a KeyGen (PRNG) block and the goal of shrinking the
// Galois keys; the generator, its seeding and this use are this design's.
module keygen_prng
  import fhe_pkg::*;
#(
  parameter int unsigned LN = LANES * NUM_MODU
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            seed_load,
  input  logic [63:0]     seed,
  input  logic            en,
  input  word_t           q,
  output word_t [LN-1:0]  y
);
  logic [LN-1:0][63:0] st;     // packed: one register per lane, not a memory

  function automatic logic [63:0] xs(input logic [63:0] v);
    logic [63:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LN; l++) st[l] <= 64'(l + 1);
    end else if (seed_load) begin
      for (int l = 0; l < LN; l++) st[l] <= seed ^ (64'(l + 1) * 64'h9E37_79B9_7F4A_7C15);
    end else if (en) begin
      for (int l = 0; l < LN; l++) st[l] <= xs(st[l]);
    end
  end

  always_comb begin
    for (int l = 0; l < LN; l++)
      y[l] = (st[l][W-1:0] >= q) ? st[l][W-1:0] - q : st[l][W-1:0];
  end
endmodule
