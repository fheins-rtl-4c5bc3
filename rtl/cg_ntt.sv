// cg_ntt: constant-geometry negacyclic NTT engine with automorphism pass.
//
// Holds one polynomial of N = 2^logn residues (logn <= MAXLG, chosen at
// run time) in a ping-pong pair of word arrays.  Every pass reads the
// current array and writes the other, so all passes use the same access
// pattern ("constant geometry"): in butterfly stage s (s = 0..logn-1) the
// engine reads X[j] and X[j+N/2] and writes
//     Y[2j]   = X[j] + X[j+N/2]
//     Y[2j+1] = (X[j] - X[j+N/2]) * w^((j >> s) << s)      (w = psi^2)
// for NS = LN/2 values of j per cycle.  This is the decimation-in-frequency
// form whose result comes out in bit-reversed order, so the last stage
// writes to bit-reversed addresses and the array is always in natural order.
//   FWD : twist pass (x_i *= psi^i), logn stages       -> NTT of x mod X^N+1
//   INV : logn stages with psi^-1, untwist (x_i *= psi^-i), scale by 1/N
//   AUTO: x_i -> +-x at i*g mod 2N (X -> X^g), LN words per cycle; HRot runs
//         INV, AUTO, FWD on these engines, as the document proposes.
// Twiddles come from an otf_gen.  Butterfly and twist passes take N/LN and
// N/NS issue cycles plus a drain of 6 cycles.  A full FWD therefore takes
// about 2N/LN + logn*(N/LN) + 7*(logn+1) cycles.
// Interface: cfg_start loads q, mu, psi, psi^-1, 1/N and fills the twiddle
// seeds (cfg_ready when done).  ld_* writes a row at row index ld_row;
// rd_row selects the row shown combinationally on rd_data.  start with
// mode / galois runs one operation; busy rises the next cycle and stays
// high until it is finished.
// Rows may be loaded or read only while busy is low.
// From the document: a CG-NTT in each HE accelerator, NTT/iNTT around an
// automorphism for HRot, on-the-fly twiddles.  The DIF variant, the twist
// passes for the negacyclic ring and the scaling pass are this design's.
//
// Lint note: butterflies run in lock step, so only lane 0's valid is read
// and multiplier tags are unconnected; in the automorphism index product
// i*g only the bits below 2N are kept (reduction mod 2N), the upper bits
// are unused by construction.
module cg_ntt
  import fhe_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned MAXLG = MAX_LOGN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_start,
  input  word_t                cfg_q,
  input  mu_t                  cfg_mu,
  input  word_t                cfg_psi,
  input  word_t                cfg_psi_inv,
  input  word_t                cfg_ninv,
  output logic                 cfg_ready,
  input  logic [4:0]           logn,
  // row access
  input  logic                 ld_valid,
  input  logic [MAXLG-1:0]     ld_row,
  input  word_t [LN-1:0]       ld_data,
  input  logic [MAXLG-1:0]     rd_row,
  output word_t [LN-1:0]       rd_data,
  // operation
  input  logic                 start,
  input  ntt_mode_e            mode,
  input  logic [MAXLG:0]       galois,
  output logic                 busy
);
  localparam int unsigned NS   = LN / 2;
  localparam int unsigned NMAX = 1 << MAXLG;
  localparam int unsigned DLY  = 6;          // issue -> write
  localparam int unsigned LGLN = $clog2(LN);
  localparam int unsigned LGNS = $clog2(NS);

  typedef enum logic [2:0] {P_TWIST, P_STAGE, P_UNTWIST, P_SCALE, P_AUTO} pass_e;

  word_t buf0 [NMAX];
  word_t buf1 [NMAX];
  logic  cur;                                // array holding valid data

  word_t     q, ninv, psi, psi_inv;
  mu_t       mu;
  logic [4:0] lg;
  ntt_mode_e md;
  logic [MAXLG:0] gal;

  // ---------------- control ----------------
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  state_e       st;
  pass_e        pass;
  logic [4:0]   stage;
  logic [MAXLG:0] cyc, ncyc;
  logic [DLY-1:0] pv;                        // valid pipeline

  function automatic logic [MAXLG:0] pass_cycles(input pass_e p, input logic [4:0] l);
    logic [MAXLG:0] n;
    n = (MAXLG+1)'(1) << l;
    if (p == P_STAGE || p == P_AUTO) return n >> LGLN;
    else                             return n >> LGNS;
  endfunction

  always_ff @(posedge clk) begin
    if (cfg_start) begin
      q <= cfg_q; mu <= cfg_mu; psi <= cfg_psi; psi_inv <= cfg_psi_inv; ninv <= cfg_ninv;
    end
  end

  logic pass_last;
  always_comb begin
    pass_last = 1'b0;
    case (pass)
      P_TWIST:   pass_last = 1'b0;
      P_STAGE:   pass_last = (stage == lg - 5'd1) && (md == NTT_FWD);
      P_UNTWIST: pass_last = 1'b0;
      default:   pass_last = 1'b1;               // P_SCALE, P_AUTO
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= 1'b0; pass <= P_TWIST; stage <= '0; cyc <= '0; ncyc <= '0;
      lg <= 5'd1; md <= NTT_FWD; gal <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          lg <= logn; md <= mode; gal <= galois; stage <= '0; cyc <= '0;
          case (mode)
            NTT_FWD:  begin pass <= P_TWIST; ncyc <= pass_cycles(P_TWIST, logn); end
            NTT_INV:  begin pass <= P_STAGE; ncyc <= pass_cycles(P_STAGE, logn); end
            default:  begin pass <= P_AUTO;  ncyc <= pass_cycles(P_AUTO, logn);  end
          endcase
          st <= S_ISSUE;
        end
        S_ISSUE: begin
          if (pass == P_AUTO) begin
            if (cyc == ncyc - 1'b1) begin cur <= ~cur; st <= S_IDLE; end
            else cyc <= cyc + 1'b1;
          end else if (cyc == ncyc - 1'b1) st <= S_DRAIN;
          else cyc <= cyc + 1'b1;
        end
        S_DRAIN: if (pv == '0) begin
          cur <= ~cur;
          cyc <= '0;
          if (pass_last) st <= S_IDLE;
          else begin
            st <= S_ISSUE;
            case (pass)
              P_TWIST: begin pass <= P_STAGE; stage <= '0; ncyc <= pass_cycles(P_STAGE, lg); end
              P_STAGE: if (stage != lg - 5'd1) stage <= stage + 5'd1;
                       else begin pass <= P_UNTWIST; ncyc <= pass_cycles(P_UNTWIST, lg); end
              P_UNTWIST: begin pass <= P_SCALE; ncyc <= pass_cycles(P_SCALE, lg); end
              default: st <= S_IDLE;
            endcase
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // ---------------- twiddles ----------------
  logic                   tw_req, tw_inv, tw_valid;
  logic [NS-1:0][MAXLG-1:0] tw_exp;
  word_t [NS-1:0]         tw;

  otf_gen #(.NS(NS), .MAXLG(MAXLG)) u_otf (
    .clk, .rst_n,
    .cfg_start,
    .cfg_psi(cfg_start ? cfg_psi : psi), .cfg_psi_inv(cfg_start ? cfg_psi_inv : psi_inv),
    .q(cfg_start ? cfg_q : q), .mu(cfg_start ? cfg_mu : mu),
    .ready(cfg_ready),
    .req_valid(tw_req), .req_inv(tw_inv), .req_exp(tw_exp),
    .tw_valid, .tw
  );

  // ---------------- issue (stage 0) ----------------
  logic issue;
  logic [MAXLG-1:0] half;
  word_t [NS-1:0] s_sum, s_dif;
  assign issue = (st == S_ISSUE) && (pass != P_AUTO);
  assign half  = MAXLG'(((MAXLG+1)'(1) << lg) >> 1);

  always_comb begin
    for (int k = 0; k < NS; k++) begin
      logic [MAXLG-1:0] j;
      word_t xa, xb;
      xb = '0;
      if (pass == P_STAGE) begin
        j  = MAXLG'(cyc) * MAXLG'(NS) + MAXLG'(k);
        xa = cur ? buf1[j] : buf0[j];
        xb = cur ? buf1[j + half] : buf0[j + half];
        s_sum[k]  = mod_add(xa, xb, q);
        s_dif[k]  = mod_sub(xa, xb, q);
        tw_exp[k] = ((j >> stage) << stage) << 1;
      end else begin
        j  = MAXLG'(cyc) * MAXLG'(NS) + MAXLG'(k);
        xa = cur ? buf1[j] : buf0[j];
        s_sum[k]  = '0;
        s_dif[k]  = xa;
        tw_exp[k] = j;
      end
    end
    tw_req = issue;
    tw_inv = (pass == P_UNTWIST) || (pass == P_STAGE && md == NTT_INV);
  end

  // ---------------- delay lines ----------------
  word_t [NS-1:0] d_sum [DLY];
  word_t [NS-1:0] d_dif [3];
  logic [MAXLG:0] d_cyc [DLY];
  pass_e          d_pass [DLY];
  logic [4:0]     d_stage [DLY];
  logic           d_last [DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pv <= '0;
    else        pv <= {pv[DLY-2:0], issue};
  end

  always_ff @(posedge clk) begin
    d_sum[0] <= s_sum; d_dif[0] <= s_dif; d_cyc[0] <= cyc; d_pass[0] <= pass;
    d_stage[0] <= stage; d_last[0] <= (pass == P_STAGE) && (stage == lg - 5'd1);
    for (int s = 1; s < DLY; s++) begin
      d_sum[s] <= d_sum[s-1]; d_cyc[s] <= d_cyc[s-1]; d_pass[s] <= d_pass[s-1];
      d_stage[s] <= d_stage[s-1]; d_last[s] <= d_last[s-1];
    end
    for (int s = 1; s < 3; s++) d_dif[s] <= d_dif[s-1];
  end

  // ---------------- multipliers ----------------
  word_t [NS-1:0] prod;
  logic  [NS-1:0] pvalid;
  for (genvar k = 0; k < NS; k++) begin : g_mul
    mod_mul #(.TAG_W(1)) u_mul (
      .clk, .rst_n,
      .in_valid (tw_valid),
      .a        (d_dif[2][k]),
      .b        ((d_pass[2] == P_SCALE) ? ninv : tw[k]),
      .q, .mu,
      .in_tag   (1'b0),
      .out_valid(pvalid[k]),
      .r        (prod[k]),
      .out_tag  ()
    );
  end

  // ---------------- write back ----------------
  always_ff @(posedge clk) begin
    if (pv[DLY-1]) begin
      for (int k = 0; k < NS; k++) begin
        logic [MAXLG-1:0] j, d0, d1;
        j = MAXLG'(d_cyc[DLY-1]) * MAXLG'(NS) + MAXLG'(k);
        if (d_pass[DLY-1] == P_STAGE) begin
          d0 = j << 1;
          d1 = (j << 1) | MAXLG'(1);
          if (d_last[DLY-1]) begin d0 = bitrev(d0, lg); d1 = bitrev(d1, lg); end
          if (cur) begin buf0[d0] <= d_sum[DLY-1][k]; buf0[d1] <= prod[k]; end
          else     begin buf1[d0] <= d_sum[DLY-1][k]; buf1[d1] <= prod[k]; end
        end else begin
          if (cur) buf0[j] <= prod[k];
          else     buf1[j] <= prod[k];
        end
      end
    end else if (st == S_ISSUE && pass == P_AUTO) begin
      for (int l = 0; l < LN; l++) begin
        logic [MAXLG-1:0] i;
        logic [2*MAXLG+1:0] prodg;
        logic [MAXLG:0] dd;
        logic [MAXLG:0] nmask;
        word_t x;
        i     = MAXLG'(cyc) * MAXLG'(LN) + MAXLG'(l);
        prodg = (2*MAXLG+2)'(i) * (2*MAXLG+2)'(gal);
        nmask = ((MAXLG+1)'(1) << (lg + 5'd1)) - 1'b1;
        dd    = prodg[MAXLG:0] & nmask;
        x     = cur ? buf1[i] : buf0[i];
        if (dd[lg]) begin
          dd[lg] = 1'b0;
          x = (x == '0) ? '0 : q - x;
        end
        if (cur) buf0[dd[MAXLG-1:0]] <= x;
        else     buf1[dd[MAXLG-1:0]] <= x;
      end
    end else if (ld_valid) begin
      for (int l = 0; l < LN; l++) begin
        if (cur) buf1[ld_row * MAXLG'(LN) + MAXLG'(l)] <= ld_data[l];
        else     buf0[ld_row * MAXLG'(LN) + MAXLG'(l)] <= ld_data[l];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LN; l++)
      rd_data[l] = cur ? buf1[rd_row * MAXLG'(LN) + MAXLG'(l)] : buf0[rd_row * MAXLG'(LN) + MAXLG'(l)];
  end

  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> !busy);
  a_mul_aligned:  assert property (@(posedge clk) disable iff (!rst_n) pvalid[0] == pv[DLY-1]);
endmodule
