// mod_mul: one lane of pipelined modular multiplication, r = a*b mod q.
//
// Barrett reduction with k = W: the caller supplies mu = floor(2^(2W)/q),
// which the host computes offline with the rest of the metadata.  Needs
// q < 2^W and a, b < q.  Three register stages:
//   1: p = a*b
//   2: t = floor(floor(p / 2^(W-1)) * mu / 2^(W+1)),  r0 = p - t*q  (< 3q)
//   3: r = r0 reduced by at most two subtractions of q
// Latency LAT = 3 cycles, one result per cycle.  A TAG_W-bit side band
// travels with the operands so callers need not delay their own context.
// The document names modular multiplication inside its MODU, NTT and BCONV
// units; the reduction method and stage split are this design's choice.
//
// Lint note: the low W+1 bits of the Barrett product t*mu are unused on
// purpose; only its high part is the quotient estimate.
module mod_mul
  import fhe_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  word_t             a,
  input  word_t             b,
  input  word_t             q,
  input  mu_t               mu,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output word_t             r,
  output logic [TAG_W-1:0]  out_tag
);
  localparam int unsigned LAT = 3;

  logic [2*W-1:0]   p1;
  word_t            q1, q2;
  mu_t              mu1;
  logic [W+1:0]     r2;          // < 3q < 2^(W+2)
  logic [LAT-1:0]   v;
  logic [TAG_W-1:0] t1, t2, t3;

  logic [W:0]       hi;
  logic [2*W+1:0]   prod_mu;
  logic [W:0]       est;
  logic [W+1:0]     r_pre;

  always_comb begin
    hi      = p1[2*W-1 -: W+1];           // floor(p / 2^(W-1))
    prod_mu = hi * mu1;
    est     = prod_mu[2*W+1 -: W+1];      // divide by 2^(W+1)
    r_pre   = p1[W+1:0] - (W+2)'(est * q1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      v <= {v[LAT-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    p1 <= a * b;
    q1 <= q;
    mu1 <= mu;
    t1 <= in_tag;
    r2 <= r_pre;
    q2 <= q1;
    t2 <= t1;
    t3 <= t2;
    if (r2 >= (W+2)'(2) * q2)      r <= word_t'(r2 - (W+2)'(2) * q2);
    else if (r2 >= (W+2)'(q2))     r <= word_t'(r2 - (W+2)'(q2));
    else                           r <= word_t'(r2);
  end

  assign out_valid = v[LAT-1];
  assign out_tag   = t3;
endmodule
