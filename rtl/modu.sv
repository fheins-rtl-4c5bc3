// modu: fully pipelined vector modular arithmetic unit (MODU).
//
// Each cycle it takes one row (LANES residues) of operand A and one of
// operand B and produces A+B, A-B or A*B mod q per lane, as chosen by op.
// Multiplication uses one Barrett lane (mod_mul) per word; addition and
// subtraction are computed in one cycle and delayed so that every op has
// the same latency LAT = 3 and results leave in issue order, one row per
// cycle.  A TAG_W-bit side band (for example the destination address)
// travels with each row.  The document gives the MODU's role (HAdd, PMult,
// HMult and the multiply-accumulate steps of key switching) and that it is
// fully pipelined; the latency and interface are this design's choice.
//
// Lint note: the per-lane multipliers run in lock step, so only lane 0's
// valid and tag are used and the other lanes' valid/tag outputs are left
// unconnected or unread.
module modu
  import fhe_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned TAG_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  modu_op_e           op,
  input  word_t [LN-1:0]     a,
  input  word_t [LN-1:0]     b,
  input  word_t              q,
  input  mu_t                mu,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output word_t [LN-1:0]     y,
  output logic [TAG_W-1:0]   out_tag
);
  localparam int unsigned LAT = 3;

  word_t [LN-1:0]     mul_r;
  word_t [LN-1:0]     as_d [LAT];
  logic  [LAT-1:0]    is_mul_d;
  logic  [LN-1:0]     mv;
  logic  [TAG_W-1:0]  tag_d [LAT];
  logic  [LAT-1:0]    v_d;

  for (genvar l = 0; l < LN; l++) begin : g_lane
    mod_mul #(.TAG_W(1)) u_mul (
      .clk, .rst_n,
      .in_valid (in_valid),
      .a        (a[l]),
      .b        (b[l]),
      .q, .mu,
      .in_tag   (1'b0),
      .out_valid(mv[l]),
      .r        (mul_r[l]),
      .out_tag  ()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LN; l++)
      as_d[0][l] <= (op == MOP_SUB) ? mod_sub(a[l], b[l], q) : mod_add(a[l], b[l], q);
    is_mul_d[0] <= (op == MOP_MUL);
    tag_d[0]    <= in_tag;
    for (int s = 1; s < LAT; s++) begin
      as_d[s]     <= as_d[s-1];
      is_mul_d[s] <= is_mul_d[s-1];
      tag_d[s]    <= tag_d[s-1];
    end
  end

  assign out_valid = v_d[LAT-1];
  assign y         = is_mul_d[LAT-1] ? mul_r : as_d[LAT-1];
  assign out_tag   = tag_d[LAT-1];

  // every lane multiplier runs in lock step with the unit's own pipeline
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) mv[0] == v_d[LAT-1]);
endmodule
