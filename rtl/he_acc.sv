// he_acc: HE accelerator (channel-level, and the core of the SSD-level one).
//
// Executes the homomorphic kernels of an FHE database query next to the
// flash data.  Functional units: NNTT constant-geometry NTT engines (used
// for NTT, iNTT and the automorphism of HRot), NBC base-conversion engines
// (key-switching modulus up/down), NB fully pipelined MODUs (HAdd, PMult,
// HMult and key-switching products), a KeyGen PRNG for the random half of
// the keys, a Galois key buffer and a scratchpad.
//
// Because FHE programs have no data-dependent branches, the host prepares
// a static schedule offline.  It is written into the program memory
// (prog_we) with its constants (cst_we: q, Barrett mu and one extra word
// per entry), and start runs it from address 0 until OP_END raises done.
// Scratch addresses count rows of LN words; row r lives in superrow r/NB,
// slice r%NB.  Instructions (fhe_pkg::instr_t):
//   RECV   n rows from the data stream (sel SPAD) or the broadcast stream
//          (sel PRNG: to scratch, sel KEY: to the key buffer) at row d;
//          sel CONST gathers n rows from each of b sources of the data
//          stream, source s to rows d + s*n .. in arrival order per source
//   SEND   n rows from scratch row a to the output stream (2 cycles/row)
//   NCFG   unit: q, mu, psi from cst[cidx], psi^-1 from cst[cidx+1].c and
//          1/N from cst[cidx+2].c; the unit fills its twiddle seeds
//   NLOAD  unit: the N/LN rows of one polynomial from scratch row a
//   NRUN   unit: start FWD / INV / AUTO (galois element b); does not block
//   NSTORE unit: its polynomial to scratch row d (waits for the unit)
//   VOP    n superrows: d = a (+,-,*) B mod cst[cidx].q, B from scratch b,
//          key buffer b, the PRNG or the constant cst[cidx].c; a, b, d are
//          multiples of NB; one superrow (NB rows) per cycle
//   BCONV  converts n limbs at rows a + i*b (i < n) to unit+1 target moduli,
//          written at rows d + j*b; constants from cst[cidx]: per input limb
//          {q_i, mu_i, qhatinv_i}, then per target {p_j, mu_j}, then
//          qhat_i mod p_j in entry cidx + n + J + i*J + j
//   SYNC   waits until every NTT unit is idle;  END stops
// logn (ring dimension 2^logn, LN*2 <= 2^logn <= 2^MAXLG) is set per run.
// The unit mix (4 NTT, 4 BCONV, 8 MODU), 128 lanes and 7 MB scratchpad are
// the document's; the instruction set, the memory organisation and the
// sequencer are this design's.
//
// Lint notes: the key buffer needs one read port, so its second port is
// left unconnected; of some constant-table entries only the q, mu or c
// field is needed at that use; functional units run lane-lock-step so only
// lane 0's valid and the low tag bits are read; row-number helpers drop
// the slice bits by design.
module he_acc
  import fhe_pkg::*;
#(
  parameter int unsigned LN     = LANES,
  parameter int unsigned NB     = NUM_MODU,
  parameter int unsigned NNTT   = NUM_NTT,
  parameter int unsigned NBC    = NUM_BCONV,
  parameter int unsigned MAXLG  = MAX_LOGN,
  parameter int unsigned SROWS  = 1592,        // 7 MB scratchpad
  parameter int unsigned KROWS  = 56,          // 256 KB Galois key buffer
  parameter int unsigned PDEPTH = 256,
  parameter int unsigned CDEPTH = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4:0]          logn,
  // metadata
  input  logic                prog_we,
  input  logic [7:0]          prog_addr,
  input  instr_t              prog_data,
  input  logic                cst_we,
  input  logic [7:0]          cst_addr,
  input  const_t              cst_data,
  input  logic                seed_we,
  input  logic [63:0]         seed,
  // control
  input  logic                start,
  output logic                busy,
  output logic                done,
  // streams
  input  logic                din_valid,
  output logic                din_ready,
  input  word_t [LN-1:0]      din_data,
  input  logic [3:0]          din_src,        // source of a data-stream row
  input  logic                bin_valid,
  output logic                bin_ready,
  input  word_t [LN-1:0]      bin_data,
  output logic                dout_valid,
  input  logic                dout_ready,
  output word_t [LN-1:0]      dout_data
);
  localparam int unsigned LGNB = $clog2(NB);
  localparam int unsigned LGLN = $clog2(LN);
  localparam int unsigned AW   = $clog2(SROWS);
  localparam int unsigned KAW  = $clog2(KROWS);
  localparam int unsigned UW   = (NNTT > 1) ? $clog2(NNTT) : 1;
  localparam int unsigned BW   = (NBC > 1) ? $clog2(NBC) : 1;

  typedef word_t [NB-1:0][LN-1:0] srow_t;

  // ---------------- metadata memories ----------------
  instr_t prog [PDEPTH];
  const_t ctab [CDEPTH];
  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_data;
    if (cst_we)  ctab[cst_addr]  <= cst_data;
  end

  // ---------------- sequencer state ----------------
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_EXEC, S_DRAIN, S_BC_WAIT, S_BC_WR, S_DONE} state_e;
  state_e      st;
  logic [7:0]  pc;
  instr_t      ir;
  logic [15:0] cnt, li, rr;
  logic        pend;                 // a read issued last cycle
  logic [15:0] pend_row;             // its row (NLOAD) / dest superrow (VOP)
  logic [LGNB-1:0] pend_slice;
  logic [15:0] pend_li;
  logic        pend_first, pend_last;
  logic [7:0]  inflight;
  logic [15:0] rows;                 // rows per polynomial
  logic [UW-1:0] un;
  logic [15:0] src_cnt [16];         // gather: rows received per source

  assign rows = 16'(((MAXLG+1)'(1) << logn) >> LGLN);
  assign un   = UW'(ir.unit);

  // ---------------- memories ----------------
  logic [AW-1:0]  ra_addr, rb_addr, w_addr;
  srow_t          ra_data, rb_data, w_data;
  logic           w_en;
  logic [NB-1:0]  w_mask;
  logic [KAW-1:0] kra, kwa;
  srow_t          kr_data, kw_data;
  logic           kw_en;
  logic [NB-1:0]  kw_mask;

  spad_mem #(.LN(LN), .NB(NB), .SROWS(SROWS)) u_spad (
    .clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .w_en, .w_addr, .w_mask, .w_data);
  spad_mem #(.LN(LN), .NB(NB), .SROWS(KROWS)) u_keybuf (
    .clk, .ra_addr(kra), .ra_data(kr_data), .rb_addr(kra), .rb_data(),
    .w_en(kw_en), .w_addr(kwa), .w_mask(kw_mask), .w_data(kw_data));

  // ---------------- NTT engines ----------------
  logic [NNTT-1:0] n_cfg, n_cfg_ready, n_ld, n_start, n_busy;
  word_t [NNTT-1:0][LN-1:0] n_rd;
  const_t c0, c1, c2;
  assign c0 = ctab[ir.cidx];
  assign c1 = ctab[8'(ir.cidx + 8'd1)];
  assign c2 = ctab[8'(ir.cidx + 8'd2)];
  word_t [LN-1:0] n_ld_data;
  assign n_ld_data = ra_data[pend_slice];

  for (genvar u = 0; u < NNTT; u++) begin : g_ntt
    cg_ntt #(.LN(LN), .MAXLG(MAXLG)) u_ntt (
      .clk, .rst_n,
      .cfg_start(n_cfg[u]), .cfg_q(c0.q), .cfg_mu(c0.mu), .cfg_psi(c0.c),
      .cfg_psi_inv(c1.c), .cfg_ninv(c2.c), .cfg_ready(n_cfg_ready[u]), .logn,
      .ld_valid(n_ld[u]), .ld_row(MAXLG'(pend_row)), .ld_data(n_ld_data),
      .rd_row(MAXLG'(cnt)), .rd_data(n_rd[u]),
      .start(n_start[u]), .mode(ir.nmode), .galois((MAXLG+1)'(ir.b)), .busy(n_busy[u]));
  end

  // ---------------- MODUs and PRNG ----------------
  srow_t            m_b, m_y, prng_y;
  logic [NB-1:0]    m_ov;
  logic [NB-1:0][15:0] m_tag;
  logic             prng_en;

  assign prng_en = pend && (st == S_EXEC || st == S_DRAIN) && ir.op == OP_VOP && ir.sel == SEL_PRNG;

  keygen_prng #(.LN(LN*NB)) u_prng (
    .clk, .rst_n, .seed_load(seed_we), .seed, .en(prng_en), .q(c0.q), .y(prng_y));

  always_comb begin
    case (ir.sel)
      SEL_SPAD: m_b = rb_data;
      SEL_KEY:  m_b = kr_data;
      SEL_PRNG: m_b = prng_y;
      default:  for (int b = 0; b < NB; b++) for (int l = 0; l < LN; l++) m_b[b][l] = c0.c;
    endcase
  end

  for (genvar b = 0; b < NB; b++) begin : g_modu
    modu #(.LN(LN), .TAG_W(16)) u_modu (
      .clk, .rst_n,
      .in_valid(pend && ir.op == OP_VOP), .op(ir.mop),
      .a(ra_data[b]), .b(m_b[b]), .q(c0.q), .mu(c0.mu),
      .in_tag(pend_row), .out_valid(m_ov[b]), .y(m_y[b]), .out_tag(m_tag[b]));
  end

  // ---------------- BCONV engines ----------------
  logic [NBC-1:0]          bc_ov;
  word_t [NBC-1:0][LN-1:0] bc_y, bc_hold;
  logic [15:0]             nj;           // number of targets
  const_t                  bc_in;
  assign nj    = 16'(ir.unit) + 16'd1;
  assign bc_in = ctab[8'(16'(ir.cidx) + pend_li)];

  for (genvar j = 0; j < NBC; j++) begin : g_bc
    const_t tgt, crs;
    assign tgt = ctab[8'(16'(ir.cidx) + ir.n + 16'(j))];
    assign crs = ctab[8'(16'(ir.cidx) + ir.n + nj + pend_li * nj + 16'(j))];
    bconv #(.LN(LN)) u_bc (
      .clk, .rst_n,
      .in_valid(pend && ir.op == OP_BCONV), .in_first(pend_first), .in_last(pend_last),
      .x(ra_data[pend_slice]), .qi(bc_in.q), .mui(bc_in.mu), .qhatinv(bc_in.c),
      .qhat_mod_p(crs.c), .p(tgt.q), .mup(tgt.mu), .out_valid(bc_ov[j]), .y(bc_y[j]));
  end

  // ---------------- address helpers ----------------
  function automatic logic [AW-1:0] srow_of(input logic [15:0] row);
    return AW'(row >> LGNB);
  endfunction
  function automatic logic [LGNB-1:0] slice_of(input logic [15:0] row);
    return row[LGNB-1:0];
  endfunction

  logic [15:0] cur_row;            // row addressed this cycle by RECV/SEND/NLOAD/NSTORE/BCONV
  always_comb begin
    case (ir.op)
      OP_RECV:   cur_row = (ir.sel == SEL_CONST) ? ir.d + 16'(din_src) * ir.n + src_cnt[din_src]
                                                 : ir.d + cnt;
      OP_NSTORE: cur_row = ir.d + cnt;
      OP_BCONV:  cur_row = (st == S_BC_WR) ? ir.d + cnt * ir.b + rr : ir.a + li * ir.b + rr;
      default:   cur_row = ir.a + cnt;
    endcase
  end

  // ---------------- combinational control ----------------
  logic exec;
  logic recv_take, ld_issue, st_do, vop_issue, bc_issue, unit_free;
  assign exec      = (st == S_EXEC);
  assign unit_free = !n_busy[un];
  assign din_ready = exec && ir.op == OP_RECV && (ir.sel == SEL_SPAD || ir.sel == SEL_CONST);
  assign bin_ready = exec && ir.op == OP_RECV && (ir.sel == SEL_KEY || ir.sel == SEL_PRNG);
  assign recv_take = (din_ready && din_valid) || (bin_ready && bin_valid);
  assign ld_issue  = exec && ir.op == OP_NLOAD && cnt < rows && unit_free;
  assign st_do     = exec && ir.op == OP_NSTORE && cnt < rows && unit_free;
  assign vop_issue = exec && ir.op == OP_VOP && cnt < ir.n;
  assign bc_issue  = exec && ir.op == OP_BCONV && li < ir.n;

  assign dout_valid = exec && ir.op == OP_SEND && pend;
  assign dout_data  = ra_data[slice_of(cur_row)];

  always_comb begin
    ra_addr = srow_of(cur_row);
    rb_addr = '0;
    kra     = '0;
    if (ir.op == OP_VOP) begin
      ra_addr = srow_of(ir.a) + AW'(cnt);
      rb_addr = srow_of(ir.b) + AW'(cnt);
      kra     = KAW'((ir.b >> LGNB) + cnt);
    end
    n_cfg   = '0;
    n_start = '0;
    n_ld    = '0;
    if (exec && ir.op == OP_NCFG)                          n_cfg[un]   = 1'b1;
    if (exec && ir.op == OP_NRUN && n_cfg_ready[un] && unit_free) n_start[un] = 1'b1;
    if (pend && ir.op == OP_NLOAD)                         n_ld[un]    = 1'b1;
    // scratch write port
    w_en = 1'b0; w_addr = '0; w_mask = '0; w_data = srow_t'(0);
    kw_en = 1'b0; kwa = '0; kw_mask = '0; kw_data = srow_t'(0);
    if (m_ov[0]) begin
      w_en = 1'b1; w_addr = AW'(m_tag[0]); w_mask = '1; w_data = m_y;
    end else if (recv_take) begin
      for (int b = 0; b < NB; b++) begin
        w_data[b]  = din_ready ? din_data : bin_data;
        kw_data[b] = bin_data;
      end
      if (ir.sel == SEL_KEY) begin
        kw_en = 1'b1; kwa = KAW'(cur_row >> LGNB); kw_mask = NB'(1) << slice_of(cur_row);
      end else begin
        w_en = 1'b1; w_addr = srow_of(cur_row); w_mask = NB'(1) << slice_of(cur_row);
      end
    end else if (st_do) begin
      w_en = 1'b1; w_addr = srow_of(cur_row); w_mask = NB'(1) << slice_of(cur_row);
      for (int b = 0; b < NB; b++) w_data[b] = n_rd[un];
    end else if (st == S_BC_WR) begin
      w_en = 1'b1; w_addr = srow_of(cur_row); w_mask = NB'(1) << slice_of(cur_row);
      for (int b = 0; b < NB; b++) w_data[b] = bc_hold[BW'(cnt)];
    end
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; ir <= '0; cnt <= '0; li <= '0; rr <= '0;
      pend <= 1'b0; pend_row <= '0; pend_slice <= '0; pend_li <= '0;
      pend_first <= 1'b0; pend_last <= 1'b0; inflight <= '0;
    end else begin
      // in-flight VOP rows
      inflight <= inflight + 8'(vop_issue) - 8'(m_ov[0]);
      if (ir.op != OP_SEND) pend <= 1'b0;
      case (st)
        S_IDLE, S_DONE: if (start) begin pc <= '0; st <= S_FETCH; end
        S_FETCH: begin
          ir <= prog[pc]; cnt <= '0; li <= '0; rr <= '0; st <= S_EXEC;
          for (int i = 0; i < 16; i++) src_cnt[i] <= '0;
        end
        S_EXEC: begin
          case (ir.op)
            OP_END: st <= S_DONE;
            OP_RECV: if (recv_take) begin
              if (cnt == ((ir.sel == SEL_CONST) ? 16'(ir.n * ir.b) : ir.n) - 16'd1) begin
                pc <= pc + 8'd1; st <= S_FETCH;
              end
              cnt <= cnt + 16'd1;
              src_cnt[din_src] <= src_cnt[din_src] + 16'd1;
            end
            OP_SEND: begin
              if (!pend) pend <= 1'b1;                // address stable: data next cycle
              else if (dout_ready) begin
                pend <= 1'b0;
                cnt  <= cnt + 16'd1;
                if (cnt == ir.n - 16'd1) begin pc <= pc + 8'd1; st <= S_FETCH; end
              end
              if (ir.n == 16'd0) begin pc <= pc + 8'd1; st <= S_FETCH; end
            end
            OP_NCFG: begin pc <= pc + 8'd1; st <= S_FETCH; end
            OP_NRUN: if (n_cfg_ready[un] && unit_free) begin pc <= pc + 8'd1; st <= S_FETCH; end
            OP_NLOAD: begin
              if (ld_issue) begin
                pend <= 1'b1; pend_row <= cnt; pend_slice <= slice_of(cur_row);
                cnt <= cnt + 16'd1;
              end
              if (cnt == rows) st <= S_DRAIN;
            end
            OP_NSTORE: begin
              if (st_do) cnt <= cnt + 16'd1;
              if (cnt == rows) begin pc <= pc + 8'd1; st <= S_FETCH; end
            end
            OP_VOP: begin
              if (vop_issue) begin
                pend <= 1'b1; pend_row <= 16'(srow_of(ir.d)) + cnt; cnt <= cnt + 16'd1;
              end else st <= S_DRAIN;
            end
            OP_BCONV: begin
              if (rr == rows) begin pc <= pc + 8'd1; st <= S_FETCH; end
              else if (bc_issue) begin
                pend <= 1'b1; pend_slice <= slice_of(cur_row); pend_li <= li;
                pend_first <= (li == 16'd0); pend_last <= (li == ir.n - 16'd1);
                li <= li + 16'd1;
                if (li == ir.n - 16'd1) st <= S_BC_WAIT;
              end
            end
            OP_SYNC: if (n_busy == '0) begin pc <= pc + 8'd1; st <= S_FETCH; end
            default: begin pc <= pc + 8'd1; st <= S_FETCH; end
          endcase
        end
        S_DRAIN: if (!pend && inflight == '0 && !m_ov[0]) begin
          pc <= pc + 8'd1; st <= S_FETCH;
        end
        S_BC_WAIT: if (bc_ov[0]) begin
          bc_hold <= bc_y; cnt <= '0; st <= S_BC_WR;
        end
        S_BC_WR: begin
          cnt <= cnt + 16'd1;
          if (cnt == nj - 16'd1) begin
            rr <= rr + 16'd1; li <= '0; cnt <= '0; st <= S_EXEC;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE) && (st != S_DONE);
  assign done = (st == S_DONE);

  a_bconv_targets: assert property (@(posedge clk) disable iff (!rst_n)
    (exec && ir.op == OP_BCONV) |-> (nj <= 16'(NBC)));
  a_single_writer: assert property (@(posedge clk) disable iff (!rst_n)
    m_ov[0] |-> !(recv_take || st_do || st == S_BC_WR));
endmodule
