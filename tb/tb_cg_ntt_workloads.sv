// tb_cg_ntt_workloads: the NTT engine at its full default size (128 lanes,
// N up to 2^16) on the two ring sizes of the evaluated workloads: N = 2^12
// (private information retrieval) and N = 2^16 (similarity scoring).  A
// direct O(N^2) transform is too slow at 2^16, so the forward NTT is
// checked on 16 coefficients (both ends and random ones), each evaluated
// here as sum_i x_i * psi^(i*(2k+1)) mod q; the inverse must then return
// every input word, and the automorphism X -> X^5 (one slot rotation)
// must move every word to i*5 mod 2N with the sign rule.  The forward
// cycle count must lie within the issue cycles plus the pass drains.
//
// Interface: none, this is a top-level testbench; the device under test
// is cg_ntt (with its otf_gen) at default parameters.  Timing: 10 ns
// clock; inputs are driven and outputs sampled on the falling edge; a
// watchdog ends the run as a failure after 600000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here; the primes,
// roots and data are this testbench's choice, the document gives only the
// ring sizes.
module tb_cg_ntt_workloads;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = LANES;
  localparam int MAXLG = MAX_LOGN;
  localparam int NMAX = 1 << MAXLG;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_start = 0, cfg_ready;
  word_t cq, cpsi, cpsii, cninv;
  mu_t cmu;
  logic [4:0] logn;
  logic ld_valid = 0;
  logic [MAXLG-1:0] ld_row, rd_row;
  word_t [LN-1:0] ld_data, rd_data;
  logic start = 0, busy;
  ntt_mode_e mode;
  logic [MAXLG:0] galois;

  cg_ntt dut (
    .clk, .rst_n, .cfg_start, .cfg_q(cq), .cfg_mu(cmu), .cfg_psi(cpsi), .cfg_psi_inv(cpsii),
    .cfg_ninv(cninv), .cfg_ready, .logn, .ld_valid, .ld_row, .ld_data, .rd_row, .rd_data,
    .start, .mode, .galois, .busy);

  int checks = 0, failures = 0;
  word_t x [NMAX], y [NMAX];

  task automatic load(int n);
    for (int r = 0; r < n / LN; r++) begin
      @(negedge clk); ld_valid = 1; ld_row = MAXLG'(r);
      for (int l = 0; l < LN; l++) ld_data[l] = x[r*LN + l];
    end
    @(negedge clk); ld_valid = 0;
  endtask

  task automatic unload(int n);
    for (int r = 0; r < n / LN; r++) begin
      rd_row = MAXLG'(r); #1;
      for (int l = 0; l < LN; l++) y[r*LN + l] = rd_data[l];
    end
  endtask

  task automatic run(ntt_mode_e m, int g, output int cyc);
    @(negedge clk); mode = m; galois = (MAXLG+1)'(g); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  task automatic workload(string name, int lgn, word_t q, word_t psi);
    int n, cyc, bound, bad;
    word_t psii, ninv;
    n = 1 << lgn; logn = 5'(lgn);
    psii = ref_pw(psi, longint'(2*n - 1), q);          // psi^-1 = psi^(2N-1)
    ninv = q - (q - 1) / word_t'(n);                    // N | q-1
    cq = q; cmu = ref_mu(q); cpsi = psi; cpsii = psii; cninv = ninv;
    @(negedge clk) cfg_start = 1; @(negedge clk) cfg_start = 0;
    while (!cfg_ready) @(negedge clk);
    for (int i = 0; i < n; i++) x[i] = word_t'({$urandom, $urandom}) % q;
    load(n); run(NTT_FWD, 0, cyc); unload(n);
    // spot coefficients of the forward transform
    bad = 0;
    for (int t = 0; t < 16; t++) begin
      int k;
      word_t s, step, p;
      k = (t == 0) ? 0 : (t == 1) ? n - 1 : int'($urandom % n);
      step = ref_pw(psi, longint'(2*k + 1), q);
      s = 0; p = 1;
      for (int i = 0; i < n; i++) begin s = mod_add(s, ref_mm(x[i], p, q), q); p = ref_mm(p, step, q); end
      checks++;
      if (y[k] !== s) begin failures++; bad++; if (bad < 4) $display("FAIL %s FWD k=%0d: %0d vs %0d", name, k, y[k], s); end
    end
    bound = 2*n/LN + lgn*(n/LN) + 8*(lgn+1) + 2;
    checks++;
    if (cyc > bound || cyc < 2*n/LN + lgn*(n/LN)) begin
      failures++; $display("FAIL %s FWD cycles %0d, bound %0d", name, cyc, bound);
    end
    $display("%s: forward NTT of N=%0d took %0d cycles", name, n, cyc);
    // inverse returns the input
    run(NTT_INV, 0, cyc); unload(n);
    bad = 0;
    for (int i = 0; i < n; i++) if (y[i] !== x[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s INV: %0d words differ", name, bad); end
    // rotation automorphism X -> X^5
    run(NTT_AUTO, 5, cyc); unload(n);
    bad = 0;
    for (int i = 0; i < n; i++) begin
      int d;
      word_t e;
      d = (i * 5) % (2*n);
      e = (d < n) ? y[d] : ((y[d-n] == 0) ? 0 : q - y[d-n]);
      if (e !== x[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s AUTO: %0d words differ", name, bad); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    workload("PIR N=2^12", 12, 36'd68719403009, 36'd5546991020);
    workload("SSC N=2^16", 16, 36'd68718428161, 36'd50499502518);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
