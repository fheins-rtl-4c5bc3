// bconv: RNS base conversion engine (BCONV), one target modulus per engine.
//
// Fast base conversion of an RNS polynomial from limbs q_0..q_{L-1} to a
// target prime p:   y = sum_i [x_i * qhatinv_i mod q_i] * (qhat_i mod p)  mod p
// with qhat_i = Q/q_i.  The input limbs of one row (LN coefficients) arrive
// one per cycle, first limb flagged in_first and last flagged in_last,
// together with that limb's constants (q_i, its Barrett mu, qhatinv_i and
// qhat_i mod p).  Each lane runs two pipelined Barrett multipliers and an
// accumulator; the converted row leaves on out_valid LAT = 7 cycles after
// the last limb.  p and mu_p must stay fixed for the whole conversion.
// The key-switching flow iNTT -> BCONV -> NTT (modulus up and down) and the
// unit's place in the accelerator are from the document; the single-target
// engine, its latency and its interface are this design's choice.
//
// Lint note: only lane 0's valid from the lock-step multipliers is read.
module bconv
  import fhe_pkg::*;
#(
  parameter int unsigned LN = LANES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  word_t [LN-1:0]  x,
  input  word_t           qi,
  input  mu_t             mui,
  input  word_t           qhatinv,
  input  word_t           qhat_mod_p,
  input  word_t           p,
  input  mu_t             mup,
  output logic            out_valid,
  output word_t [LN-1:0]  y
);
  word_t [LN-1:0] t, u;
  logic  [LN-1:0] tv, uv;
  logic [W+1:0]  ctx_in;                 // {first, last, qhat_mod_p}
  logic [W+1:0]  ctx [LN];
  logic [1:0]    fl;
  word_t [LN-1:0] acc;
  logic          ov;

  assign ctx_in = {in_first, in_last, qhat_mod_p};

  for (genvar l = 0; l < LN; l++) begin : g_lane
    logic [W+1:0] c1;
    mod_mul #(.TAG_W(W+2)) u_m1 (
      .clk, .rst_n, .in_valid(in_valid), .a(x[l]), .b(qhatinv), .q(qi), .mu(mui),
      .in_tag(ctx_in), .out_valid(tv[l]), .r(t[l]), .out_tag(c1));
    mod_mul #(.TAG_W(W+2)) u_m2 (
      .clk, .rst_n, .in_valid(tv[l]), .a(t[l]), .b(c1[W-1:0]), .q(p), .mu(mup),
      .in_tag(c1), .out_valid(uv[l]), .r(u[l]), .out_tag(ctx[l]));
  end

  assign fl = ctx[0][W+1:W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ov <= 1'b0;
    else        ov <= uv[0] && fl[0];
  end

  always_ff @(posedge clk) begin
    if (uv[0]) begin
      for (int l = 0; l < LN; l++)
        acc[l] <= fl[1] ? u[l] : mod_add(acc[l], u[l], p);
    end
  end

  assign out_valid = ov;
  assign y         = acc;
endmodule
