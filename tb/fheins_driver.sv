// fheins_driver: end-to-end stimulus and checker for fheins_top, shared by
// the reduced and the full-size top-level testbenches.
//
// It models the parts around the fabric: NAND channels (a page read delay,
// then a byte stream), the host writing metadata and the global buffer,
// and the host reading the result.  The query is one encrypted-selection
// step of the kind used for private information retrieval and similarity
// scoring, on one RNS limb, run in every channel-level accelerator on its
// own database polynomial D_a:
//   x   = D_a * Qm                        (plaintext-ciphertext product)
//   r   = NTT(auto_5(iNTT(x)))            (rotation: iNTT, automorphism, NTT)
//   y   = x + r                           (rotate-and-add reduction step)
//   z   = y*kb + y*ka                     (key products; kb from the key
//                                          buffer, ka regenerated by the PRNG)
//   c   = BCONV(z) to prime p0            (modulus switch of key switching)
// Each sends z and c over the on-chip network; the SSD-level accelerator
// files them by source and adds them over all accelerators.  Before that,
// the fabric runs in conventional-I/O mode and raw channel bytes must come
// out on the host path.  The reference values are computed here with %
// arithmetic and direct O(N^2) transforms.  Mechanisms counted (each must
// occur): conventional-I/O transfers, mode switch, channel stall in the
// aggregator, multi-destination broadcast, network contention, forward /
// inverse NTT, automorphism, BCONV, PRNG key use, key-buffer use.
//
// Interface: instantiated by the top-level testbench with the same
// parameters as the fheins_top it drives; it owns clock and reset and
// connects to every top-level port.  Exposes checks / failures counters
// and runs the whole sequence from its own initial block.  Timing: 10 ns clock, drive and sample on the falling
// edge; each NAND page read waits a fixed delay before its byte stream.
// The kernel, the channel model and all numbers in it are this
// testbench's choice; the document gives no test program.
module fheins_driver
  import fhe_pkg::*;
#(
  parameter int LN = 8, NB = 2, NACC = 2, K = 2, LGN = 4, GB_ROWS = 16, TR = 30
) (
  output logic                     clk,
  output logic                     rst_n,
  output logic                     mode,
  output logic [4:0]               logn,
  output logic [NACC*K-1:0]        ch_valid,
  input  logic [NACC*K-1:0]        ch_ready,
  output logic [NACC*K-1:0][7:0]   ch_data,
  input  logic [NACC*K-1:0]        io_valid,
  output logic [NACC*K-1:0]        io_ready,
  input  logic [NACC*K-1:0][7:0]   io_data,
  output logic [$clog2(NACC+1)-1:0] md_sel,
  output logic                     md_prog_we,
  output logic                     md_cst_we,
  output logic                     md_seed_we,
  output logic [7:0]               md_addr,
  output instr_t                   md_prog,
  output const_t                   md_cst,
  output logic [63:0]              md_seed,
  output logic                     gb_we,
  output logic [$clog2(GB_ROWS)-1:0] gb_addr,
  output word_t [LN-1:0]           gb_data,
  output logic                     gb_st_start,
  output logic [$clog2(GB_ROWS)-1:0] gb_st_base,
  output logic [$clog2(GB_ROWS):0] gb_st_count,
  output logic [NACC:0]            gb_dst_mask,
  input  logic                     gb_busy,
  output logic                     start,
  input  logic [NACC:0]            acc_done,
  input  logic                     done_all,
  input  logic                     res_valid,
  output logic                     res_ready,
  input  word_t [LN-1:0]           res_data,
  input  logic [NACC-1:0][31:0]    agg_stall_cnt,
  input  logic [31:0]              noc_contention_cnt,
  // observation of internal events (for the mechanism counters)
  input  logic [NACC:0]            bc_multi,
  input  logic [NACC-1:0][2:0]     ev_ntt,       // {auto, inv, fwd} started
  input  logic [NACC-1:0]          ev_bconv,
  input  logic [NACC-1:0]          ev_prng,
  input  logic [NACC-1:0]          ev_key
);
  `include "tb_common.svh"
  localparam int N   = 1 << LGN;
  localparam int R   = N / LN;                 // rows per polynomial
  localparam int NCH = NACC * K;
  localparam int SW  = LN / K;
  localparam int BPW = 5;
  localparam int BYTES = R * SW * BPW;        // bytes per channel
  localparam word_t Q = (LGN == 4) ? 36'd68719476577 : (LGN == 6) ? 36'd68719474049 :
                        (LGN == 12) ? 36'd68719403009 : 36'd68718428161;
  localparam word_t PSI = (LGN == 4) ? 36'd29530886214 : (LGN == 6) ? 36'd35524313727 :
                          (LGN == 12) ? 36'd5546991020 : 36'd50499502518;
  localparam word_t P0 = 36'd68718428153;     // second prime for BCONV (< Q)

  initial clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_conv = 0, cnt_mode = 0, cnt_bcast = 0, cnt_fwd = 0, cnt_inv = 0, cnt_auto = 0;
  int cnt_bconv = 0, cnt_prng = 0, cnt_key = 0;

  word_t D [NACC][N], QM [N], KB [N], EXP [4*R][LN];
  word_t pw [2*N], pwi [2*N];
  word_t QHI, CR;
  logic [63:0] SEEDS [NACC];
  word_t PSII, NINV;

  // ---------------- reference ----------------
  function automatic void ntt_ref(ref word_t a [N], ref word_t o [N], input bit inv);
    for (int k = 0; k < N; k++) begin
      word_t s; s = 0;
      for (int i = 0; i < N; i++) begin
        int e; e = inv ? (k * (2*i + 1)) % (2*N) : (i * (2*k + 1)) % (2*N);
        s = mod_add(s, ref_mm(a[i], inv ? pwi[e] : pw[e], Q), Q);
      end
      o[k] = inv ? ref_mm(s, NINV, Q) : s;
    end
  endfunction

  task automatic build_reference();
    word_t Z [NACC][N], C [NACC][N];
    for (int a = 0; a < NACC; a++) begin
      word_t x [N], c [N], c2 [N], r [N];
      for (int i = 0; i < N; i++) x[i] = ref_mm(D[a][i], QM[i], Q);
      ntt_ref(x, c, 1);
      for (int i = 0; i < N; i++) begin
        int d; d = (i * 5) % (2*N);
        if (d < N) c2[d] = c[i]; else c2[d-N] = (c[i] == 0) ? 0 : Q - c[i];
      end
      ntt_ref(c2, r, 0);
      for (int i = 0; i < N; i++) begin
        word_t y, ka;
        logic [63:0] st;
        y  = mod_add(x[i], r[i], Q);
        st = SEEDS[a] ^ (64'(i % (LN*NB) + 1) * 64'h9E37_79B9_7F4A_7C15);
        for (int k = 0; k < i / (LN*NB); k++) st = ref_xs(st);   // one step per superrow
        ka = ref_prng(st, Q);
        Z[a][i] = mod_add(ref_mm(y, KB[i], Q), ref_mm(y, ka, Q), Q);
        C[a][i] = ref_mm(ref_mm(Z[a][i], QHI, Q), CR, P0);
      end
    end
    for (int i = 0; i < N; i++) begin
      word_t sz, sc;
      sz = 0; sc = 0;
      for (int a = 0; a < NACC; a++) begin sz = mod_add(sz, Z[a][i], Q); sc = mod_add(sc, C[a][i], Q); end
      EXP[i / LN][i % LN] = sz;
      EXP[R + i / LN][i % LN] = sc;
    end
  endtask

  // ---------------- host metadata ----------------
  int pc;
  task automatic md_instr(int sel, opcode_e op, int unit, sel_e s, modu_op_e mop, ntt_mode_e nm,
                          int a, int b, int d, int n, int cidx);
    @(negedge clk);
    md_sel = ($clog2(NACC+1))'(sel); md_prog_we = 1; md_addr = 8'(pc); pc++;
    md_prog = '{op: op, unit: 3'(unit), sel: s, mop: mop, nmode: nm, a: 16'(a), b: 16'(b),
                d: 16'(d), n: 16'(n), cidx: 8'(cidx)};
    @(negedge clk); md_prog_we = 0;
  endtask
  task automatic md_const(int sel, int addr, word_t q, word_t c);
    @(negedge clk);
    md_sel = ($clog2(NACC+1))'(sel); md_cst_we = 1; md_addr = 8'(addr);
    md_cst = '{q: q, mu: ref_mu(q), c: c};
    @(negedge clk); md_cst_we = 0;
  endtask

  // slot s of the scratchpad holds one polynomial at rows s*R
  task automatic load_programs();
    for (int a = 0; a < NACC; a++) begin
      pc = 0;
      md_const(a, 0, Q, 0); md_const(a, 1, Q, PSI); md_const(a, 2, Q, PSII); md_const(a, 3, Q, NINV);
      md_const(a, 8, Q, QHI); md_const(a, 9, P0, 0); md_const(a, 10, 0, CR);
      md_instr(a, OP_RECV,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0*R, R, 0);   // database
      md_instr(a, OP_RECV,  0, SEL_PRNG, MOP_ADD, NTT_FWD, 0, 0, 1*R, R, 0);   // query (broadcast)
      md_instr(a, OP_RECV,  0, SEL_KEY,  MOP_ADD, NTT_FWD, 0, 0, 0,   R, 0);   // key half (broadcast)
      md_instr(a, OP_VOP,   0, SEL_SPAD, MOP_MUL, NTT_FWD, 0*R, 1*R, 2*R, R/NB, 0);
      md_instr(a, OP_NCFG,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1);
      md_instr(a, OP_NLOAD, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 2*R, 0, 0, 0, 1);
      md_instr(a, OP_NRUN,  0, SEL_SPAD, MOP_ADD, NTT_INV, 0, 0, 0, 0, 1);
      md_instr(a, OP_NRUN,  0, SEL_SPAD, MOP_ADD, NTT_AUTO, 0, 5, 0, 0, 1);
      md_instr(a, OP_NRUN,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1);
      md_instr(a, OP_NSTORE,0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 3*R, 0, 1);
      md_instr(a, OP_VOP,   0, SEL_SPAD, MOP_ADD, NTT_FWD, 2*R, 3*R, 4*R, R/NB, 0);
      md_instr(a, OP_VOP,   0, SEL_KEY,  MOP_MUL, NTT_FWD, 4*R, 0, 5*R, R/NB, 0);
      md_instr(a, OP_VOP,   0, SEL_PRNG, MOP_MUL, NTT_FWD, 4*R, 0, 6*R, R/NB, 0);
      md_instr(a, OP_VOP,   0, SEL_SPAD, MOP_ADD, NTT_FWD, 5*R, 6*R, 7*R, R/NB, 0);
      md_instr(a, OP_BCONV, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 7*R, R, 8*R, 1, 8);
      md_instr(a, OP_SEND,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 7*R, 0, 0, 2*R, 0);
      md_instr(a, OP_END,   0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 0);
      @(negedge clk); md_sel = ($clog2(NACC+1))'(a); md_seed = SEEDS[a]; md_seed_we = 1;
      @(negedge clk); md_seed_we = 0;
    end
    // SSD-level: gather 2R rows from each accelerator, add them all up
    pc = 0;
    md_const(NACC, 0, Q, 0);
    md_instr(NACC, OP_RECV, 0, SEL_CONST, MOP_ADD, NTT_FWD, 0, NACC, 0, 2*R, 0);
    md_instr(NACC, OP_VOP,  0, SEL_SPAD,  MOP_ADD, NTT_FWD, 0, 2*R, NACC*2*R, 2*R/NB, 0);
    for (int a = 2; a < NACC; a++)
      md_instr(NACC, OP_VOP, 0, SEL_SPAD, MOP_ADD, NTT_FWD, NACC*2*R, a*2*R, NACC*2*R, 2*R/NB, 0);
    md_instr(NACC, OP_SEND, 0, SEL_SPAD, MOP_ADD, NTT_FWD, NACC*2*R, 0, 0, 2*R, 0);
    md_instr(NACC, OP_END,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 0);
  endtask

  // ---------------- flash channels ----------------
  logic ch_go;
  int   ch_pos [NCH];
  function automatic logic [7:0] chan_byte(int ch, int p);
    int a, k, r, w, b;
    logic [39:0] v;
    a = ch / K; k = ch % K;
    r = p / (SW * BPW); w = (p % (SW * BPW)) / BPW; b = p % BPW;
    v = 40'(D[a][r*LN + k*SW + w]);
    return v[b*8 +: 8];
  endfunction

  logic [NCH-1:0] ch_acc_q;
  always @(posedge clk) ch_acc_q <= ch_valid & ch_ready;
  always @(negedge clk) begin
    if (ch_go) begin
      for (int c = 0; c < NCH; c++) begin
        if (ch_acc_q[c]) ch_pos[c]++;
        ch_valid[c] = ch_pos[c] < BYTES;
        ch_data[c]  = chan_byte(c, ch_pos[c]);
      end
    end
  end

  // ---------------- event counters ----------------
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) if (io_valid[c] && io_ready[c]) cnt_conv++;
    if ($countones(bc_multi) > 1) cnt_bcast++;
    for (int a = 0; a < NACC; a++) begin
      if (ev_ntt[a][0]) cnt_fwd++;
      if (ev_ntt[a][1]) cnt_inv++;
      if (ev_ntt[a][2]) cnt_auto++;
      if (ev_bconv[a]) cnt_bconv++;
      if (ev_prng[a]) cnt_prng++;
      if (ev_key[a]) cnt_key++;
    end
  end

  task automatic need(int v, string what);
    checks++;
    if (v == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    int row, t0;
    logic [2*W+1:0] t;
    rst_n = 0; mode = 0; logn = 5'(LGN); ch_valid = '0; ch_data = '0; io_ready = '1;
    md_sel = '0; md_prog_we = 0; md_cst_we = 0; md_seed_we = 0; md_addr = '0; md_prog = '0;
    md_cst = '0; md_seed = '0; gb_we = 0; gb_addr = '0; gb_data = '0; gb_st_start = 0;
    gb_st_base = '0; gb_st_count = '0; gb_dst_mask = '0; start = 0; res_ready = 1; ch_go = 0;
    for (int c = 0; c < NCH; c++) ch_pos[c] = 0;
    PSII = ref_pw(PSI, 2*N - 1, Q);
    NINV = ref_pw(word_t'(N), longint'(Q) - 2, Q);
    pw[0] = 1; pwi[0] = 1;
    for (int i = 1; i < 2*N; i++) begin pw[i] = ref_mm(pw[i-1], PSI, Q); pwi[i] = ref_mm(pwi[i-1], PSII, Q); end
    for (int a = 0; a < NACC; a++) begin
      SEEDS[a] = {$urandom, $urandom};
      for (int i = 0; i < N; i++) D[a][i] = word_t'({$urandom, $urandom}) % Q;
    end
    for (int i = 0; i < N; i++) begin
      QM[i] = (i % 3 == 0) ? 1 : word_t'({$urandom, $urandom}) % Q;
      KB[i] = word_t'({$urandom, $urandom}) % Q;
    end
    QHI = word_t'({$urandom, $urandom}) % Q;
    CR  = word_t'({$urandom, $urandom}) % P0;
    build_reference();
    repeat (3) @(negedge clk); rst_n = 1;

    // conventional I/O: raw bytes pass to the host path
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      ch_valid = '1;
      for (int c = 0; c < NCH; c++) ch_data[c] = 8'(i * 16 + c);
      #1;
      checks++;
      if (io_valid !== ch_valid || io_data !== ch_data || ch_ready !== io_ready) begin
        failures++; $display("FAIL conventional path");
      end
    end
    @(negedge clk); ch_valid = '0;

    // switch to FHE acceleration
    @(negedge clk); mode = 1; cnt_mode++;
    load_programs();
    for (int r = 0; r < 2*R; r++) begin
      @(negedge clk); gb_we = 1; gb_addr = ($clog2(GB_ROWS))'(r);
      for (int l = 0; l < LN; l++) gb_data[l] = (r < R) ? QM[r*LN + l] : KB[(r-R)*LN + l];
    end
    @(negedge clk); gb_we = 0;

    // page read latency, then the channels stream the database pages
    repeat (TR) @(negedge clk);
    ch_go = 1;
    repeat (4 * SW * BPW) @(negedge clk);      // let rows pile up ahead of the accelerators
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // broadcast query, then keys, to every channel-level accelerator
    @(negedge clk); gb_st_start = 1; gb_st_base = '0; gb_st_count = ($clog2(GB_ROWS)+1)'(R);
    gb_dst_mask = {1'b0, {NACC{1'b1}}};
    @(negedge clk); gb_st_start = 0;
    @(negedge clk); while (gb_busy) @(negedge clk);
    @(negedge clk); gb_st_start = 1; gb_st_base = ($clog2(GB_ROWS))'(R);
    @(negedge clk); gb_st_start = 0;
    @(negedge clk); while (gb_busy) @(negedge clk);

    row = 0;
    while (row < 2*R) begin
      @(posedge clk);
      if (res_valid && res_ready) begin
        int bad;
        bad = 0;
        for (int l = 0; l < LN; l++) if (res_data[l] !== EXP[row][l]) bad++;
        checks++;
        if (bad != 0) begin
          failures++; $display("FAIL result row %0d: %0d words differ (%0d vs %0d)", row, bad, res_data[0], EXP[row][0]);
        end
        row++;
      end
    end
    while (!done_all) @(posedge clk);

    need(cnt_conv, "conventional-I/O transfer");
    need(cnt_mode, "mode switch");
    need(agg_stall_cnt[0], "channel stall in aggregator");
    need(cnt_bcast, "multi-destination broadcast");
    need(noc_contention_cnt, "network contention");
    need(cnt_fwd, "forward NTT"); need(cnt_inv, "inverse NTT"); need(cnt_auto, "automorphism");
    need(cnt_bconv, "base conversion"); need(cnt_prng, "PRNG key use"); need(cnt_key, "key-buffer use");
    $display("events: conv=%0d mode=%0d stall=%0d bcast=%0d contention=%0d fwd=%0d inv=%0d auto=%0d bconv=%0d prng=%0d key=%0d",
             cnt_conv, cnt_mode, agg_stall_cnt[0], cnt_bcast, noc_contention_cnt, cnt_fwd, cnt_inv,
             cnt_auto, cnt_bconv, cnt_prng, cnt_key);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
