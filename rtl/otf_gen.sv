// otf_gen: on-the-fly twiddle factor generator (OTFGen).
//
// Instead of storing the N-1 twiddle factors of a large ring, it keeps two
// small seed tables per direction and forms any power psi^e (e < 2^MAXLG)
// as the product of a low-part and a high-part entry:
//     psi^e = LO[e mod 2^LG_LO] * HI[e >> LG_LO]  mod q
// The tables are themselves computed on chip from a single seed per
// direction (psi for forward, psi^-1 for inverse): after cfg_start the
// generator fills LO[k] = psi^k and HI[k] = psi^(k*2^LG_LO) for both seeds
// with one sequential Barrett multiplier (5 cycles per entry, about
// 10*(2^LG_LO + 2^(MAXLG-LG_LO)) cycles for both seeds)
// and then raises ready.  Serving is pipelined: NS exponents per cycle
// in, NS twiddles out LAT = 3 cycles later.  For MAXLG = 16 the seed memory
// is 2 x (256+256) words of W bits, about 4.6 KB.
// From the document: twiddles produced per (i)NTT stage on the fly from a
// seed memory under 32 KB.  The two-table split and the on-chip table fill
// are this design's choice.
//
// Lint note: all server lanes run in lock step; only lane 0's valid is
// read and the multiplier tag outputs are left unconnected.
module otf_gen
  import fhe_pkg::*;
#(
  parameter int unsigned NS    = LANES/2,
  parameter int unsigned MAXLG = MAX_LOGN,
  parameter int unsigned LG_LO = MAXLG/2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration
  input  logic                   cfg_start,
  input  word_t                  cfg_psi,
  input  word_t                  cfg_psi_inv,
  input  word_t                  q,
  input  mu_t                    mu,
  output logic                   ready,
  // twiddle requests
  input  logic                   req_valid,
  input  logic                   req_inv,
  input  logic [NS-1:0][MAXLG-1:0] req_exp,
  output logic                   tw_valid,
  output word_t [NS-1:0]         tw
);
  localparam int unsigned NLO = 1 << LG_LO;
  localparam int unsigned NHI = 1 << (MAXLG - LG_LO);

  word_t lo_t [2][NLO];
  word_t hi_t [2][NHI];

  // ---------------- table fill ----------------
  typedef enum logic [2:0] {B_IDLE, B_LO, B_G, B_HI, B_WAIT, B_DONE} bstate_e;
  bstate_e        bst, bnext_after;
  logic           bset;                 // 0 = forward, 1 = inverse
  logic [MAXLG:0] bidx;
  word_t          bacc, bmul, gval;
  logic           bm_valid, bm_out_valid;
  word_t          bm_a, bm_r;

  assign bmul = bset ? cfg_psi_inv : cfg_psi;

  mod_mul #(.TAG_W(1)) u_build (
    .clk, .rst_n,
    .in_valid (bm_valid),
    .a        (bm_a),
    .b        ((bnext_after == B_HI) ? gval : bmul),
    .q, .mu,
    .in_tag   (1'b0),
    .out_valid(bm_out_valid),
    .r        (bm_r),
    .out_tag  ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; bnext_after <= B_LO; bset <= 1'b0; bidx <= '0;
      bacc <= '0; gval <= '0; bm_valid <= 1'b0; bm_a <= '0;
    end else begin
      bm_valid <= 1'b0;
      case (bst)
        B_IDLE, B_DONE: if (cfg_start) begin
          bst <= B_LO; bset <= 1'b0; bidx <= '0; bacc <= word_t'(1);
          bnext_after <= B_LO;
        end
        B_LO: begin                         // write LO[bidx] = bacc, start next
          lo_t[bset][bidx[LG_LO-1:0]] <= bacc;
          bm_a <= bacc; bm_valid <= 1'b1; bst <= B_WAIT;
          bnext_after <= (bidx == (MAXLG+1)'(NLO-1)) ? B_G : B_LO;
        end
        B_G: begin                          // bacc = psi^NLO becomes HI step
          gval <= bacc; bidx <= '0; bacc <= word_t'(1); bst <= B_HI;
          bnext_after <= B_HI;
        end
        B_HI: begin
          hi_t[bset][bidx[MAXLG-LG_LO-1:0]] <= bacc;
          if (bidx == (MAXLG+1)'(NHI-1)) begin
            if (bset) bst <= B_DONE;
            else begin
              bset <= 1'b1; bidx <= '0; bacc <= word_t'(1); bst <= B_LO;
              bnext_after <= B_LO;
            end
          end else begin
            bm_a <= bacc; bm_valid <= 1'b1; bst <= B_WAIT;
          end
        end
        B_WAIT: if (bm_out_valid) begin
          bacc <= bm_r;
          bst  <= bnext_after;
          if (bnext_after != B_G) bidx <= bidx + 1'b1;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  assign ready = (bst == B_DONE) && !cfg_start;

  // ---------------- serving ----------------
  logic [NS-1:0] sv;
  for (genvar k = 0; k < NS; k++) begin : g_srv
    logic [LG_LO-1:0]       el;
    logic [MAXLG-LG_LO-1:0] eh;
    assign el = req_exp[k][LG_LO-1:0];
    assign eh = req_exp[k][MAXLG-1:LG_LO];
    mod_mul #(.TAG_W(1)) u_tw (
      .clk, .rst_n,
      .in_valid (req_valid),
      .a        (lo_t[req_inv][el]),
      .b        (hi_t[req_inv][eh]),
      .q, .mu,
      .in_tag   (1'b0),
      .out_valid(sv[k]),
      .r        (tw[k]),
      .out_tag  ()
    );
  end
  assign tw_valid = sv[0];

  a_req_when_ready: assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> ready);
endmodule
