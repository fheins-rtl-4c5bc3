// tb_he_acc: runs a small static schedule on a reduced HE accelerator (8
// lanes, 2 MODUs, 2 NTT and 2 BCONV engines, N = 16) and checks every
// result row it sends back against values computed here: vector multiply /
// add-with-key / subtract-constant / multiply-with-PRNG, a forward NTT, an
// automorphism and a two-limb to two-target base conversion. Also checks
// the SEND rate of one row per two cycles.
//
// Interface: none, this is a top-level testbench; the device under test
// is he_acc.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_he_acc;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = 8, NB = 2, LGN = 4, N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prog_we = 0, cst_we = 0, seed_we = 0, start = 0, busy, done;
  logic [7:0] prog_addr, cst_addr;
  instr_t prog_data;
  const_t cst_data;
  logic [63:0] seed = 64'h0123_4567_89AB_CDEF;
  logic din_valid = 0, din_ready, bin_valid = 0, bin_ready, dout_valid, dout_ready = 1;
  word_t [LN-1:0] din_data, bin_data, dout_data;

  he_acc #(.LN(LN), .NB(NB), .NNTT(2), .NBC(2), .MAXLG(6), .SROWS(16), .KROWS(4),
           .PDEPTH(32), .CDEPTH(32)) dut (
    .clk, .rst_n, .logn(5'(LGN)), .prog_we, .prog_addr, .prog_data, .cst_we, .cst_addr, .cst_data,
    .seed_we, .seed, .start, .busy, .done, .din_valid, .din_ready, .din_data, .din_src(4'd0),
    .bin_valid, .bin_ready, .bin_data, .dout_valid, .dout_ready, .dout_data);

  int checks = 0, failures = 0;
  localparam word_t Q  = 36'd68719476577, PSI = 36'd29530886214, PSII = 36'd18348986349, NINV = 36'd64424509291;
  localparam word_t Q1 = 36'd68719474049, P0 = 36'd68719403009, P1 = 36'd68718428161;
  localparam word_t CK = 36'd12345678901;

  word_t A [N], B [N], KY [N], ref_rows [16][LN], qhi [2], cr [2][2];
  int ninstr = 0;

  function automatic instr_t mk(opcode_e op, int unit, sel_e sel, modu_op_e mop, ntt_mode_e nm,
                                int a, int b, int d, int n, int cidx);
    instr_t i;
    i.op = op; i.unit = 3'(unit); i.sel = sel; i.mop = mop; i.nmode = nm;
    i.a = 16'(a); i.b = 16'(b); i.d = 16'(d); i.n = 16'(n); i.cidx = 8'(cidx);
    return i;
  endfunction
  task automatic put(instr_t i);
    @(negedge clk); prog_we = 1; prog_addr = 8'(ninstr); prog_data = i; ninstr++;
    @(negedge clk); prog_we = 0;
  endtask
  task automatic putc(int idx, word_t q, word_t c);
    @(negedge clk); cst_we = 1; cst_addr = 8'(idx); cst_data = '{q: q, mu: ref_mu(q), c: c};
    @(negedge clk); cst_we = 0;
  endtask

  initial begin
    int t_first, t_last, row_cnt;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      A[i]  = word_t'({$urandom, $urandom}) % P1;
      B[i]  = word_t'({$urandom, $urandom}) % P1;
      KY[i] = word_t'({$urandom, $urandom}) % Q;
    end
    for (int i = 0; i < 2; i++) begin
      qhi[i] = word_t'({$urandom, $urandom}) % Q1;
      for (int j = 0; j < 2; j++) cr[i][j] = word_t'({$urandom, $urandom}) % P1;
    end
    // constants
    putc(0, Q, CK); putc(1, Q, PSI); putc(2, Q, PSII); putc(3, Q, NINV);
    putc(8, Q, qhi[0]); putc(9, Q1, qhi[1]); putc(10, P0, 0); putc(11, P1, 0);
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) putc(12 + i*2 + j, 0, cr[i][j]);
    @(negedge clk); seed_we = 1; @(negedge clk); seed_we = 0;
    // program
    put(mk(OP_RECV, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 4, 0));
    put(mk(OP_RECV, 0, SEL_KEY,  MOP_ADD, NTT_FWD, 0, 0, 0, 2, 0));
    put(mk(OP_VOP,  0, SEL_SPAD, MOP_MUL, NTT_FWD, 0, 2, 4, 1, 0));
    put(mk(OP_VOP,  0, SEL_KEY,  MOP_ADD, NTT_FWD, 0, 0, 6, 1, 0));
    put(mk(OP_VOP,  0, SEL_CONST,MOP_SUB, NTT_FWD, 2, 0, 8, 1, 0));
    put(mk(OP_VOP,  0, SEL_PRNG, MOP_MUL, NTT_FWD, 0, 0, 10, 1, 0));
    put(mk(OP_NCFG, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1));
    put(mk(OP_NCFG, 1, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1));
    put(mk(OP_NLOAD,0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1));
    put(mk(OP_NRUN, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 1));
    put(mk(OP_NLOAD,1, SEL_SPAD, MOP_ADD, NTT_FWD, 2, 0, 0, 0, 1));
    put(mk(OP_NRUN, 1, SEL_SPAD, MOP_ADD, NTT_AUTO,0, 5, 0, 0, 1));
    put(mk(OP_SYNC, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 0));
    put(mk(OP_NSTORE,0,SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 12, 0, 1));
    put(mk(OP_NSTORE,1,SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 14, 0, 1));
    put(mk(OP_BCONV,1, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 2, 16, 2, 8));
    put(mk(OP_SEND, 0, SEL_SPAD, MOP_ADD, NTT_FWD, 4, 0, 0, 16, 0));
    put(mk(OP_END,  0, SEL_SPAD, MOP_ADD, NTT_FWD, 0, 0, 0, 0, 0));
    // reference rows (row r holds words r*LN .. of its polynomial)
    for (int i = 0; i < N; i++) begin
      logic [63:0] st;
      word_t ntt, t0, t1;
      int d;
      ref_rows[0 + i/LN][i%LN] = ref_mm(A[i], B[i], Q);
      ref_rows[2 + i/LN][i%LN] = mod_add(A[i], KY[i], Q);
      ref_rows[4 + i/LN][i%LN] = mod_sub(B[i], CK, Q);
      st = seed ^ (64'(i + 1) * 64'h9E37_79B9_7F4A_7C15);
      ref_rows[6 + i/LN][i%LN] = ref_mm(A[i], ref_prng(st, Q), Q);
      ntt = 0;
      for (int k = 0; k < N; k++) ntt = mod_add(ntt, ref_mm(A[k], ref_pw(PSI, longint'(k) * (2*i + 1), Q), Q), Q);
      ref_rows[8 + i/LN][i%LN] = ntt;
      d = (i * 5) % (2*N);
      if (d < N) ref_rows[10 + d/LN][d%LN] = B[i];
      else       ref_rows[10 + (d-N)/LN][(d-N)%LN] = (B[i] == 0) ? 0 : Q - B[i];
      t0 = ref_mm(A[i], qhi[0], Q);
      t1 = ref_mm(B[i], qhi[1], Q1);
      ref_rows[12 + i/LN][i%LN] = mod_add(ref_mm(t0, cr[0][0], P0), ref_mm(t1, cr[1][0], P0), P0);
      ref_rows[14 + i/LN][i%LN] = mod_add(ref_mm(t0, cr[0][1], P1), ref_mm(t1, cr[1][1], P1), P1);
    end
    // run
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      begin
        for (int r = 0; r < 4; r++) begin
          din_valid = 1;
          for (int l = 0; l < LN; l++) din_data[l] = (r < 2) ? A[r*LN + l] : B[(r-2)*LN + l];
          @(posedge clk); while (!din_ready) @(posedge clk);
          @(negedge clk);
        end
        din_valid = 0;
        for (int r = 0; r < 2; r++) begin
          bin_valid = 1;
          for (int l = 0; l < LN; l++) bin_data[l] = KY[r*LN + l];
          @(posedge clk); while (!bin_ready) @(posedge clk);
          @(negedge clk);
        end
        bin_valid = 0;
      end
      begin
        row_cnt = 0;
        while (row_cnt < 16) begin
          @(posedge clk);
          if (dout_valid && dout_ready) begin
            int bad;
            bad = 0;
            if (row_cnt == 0) t_first = $time / 10;
            t_last = $time / 10;
            for (int l = 0; l < LN; l++) if (dout_data[l] !== ref_rows[row_cnt][l]) bad++;
            checks++;
            if (bad != 0) begin failures++; $display("FAIL row %0d: %0d words differ", row_cnt, bad); end
            row_cnt++;
          end
        end
      end
    join
    while (!done) @(posedge clk);
    checks++;
    if (t_last - t_first != 2 * 15) begin failures++; $display("FAIL SEND rate: %0d cycles", t_last - t_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
