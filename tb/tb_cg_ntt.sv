// tb_cg_ntt: checks the constant-geometry NTT engine against a direct
// O(N^2) negacyclic transform computed here with plain % arithmetic. Runs N
// = 64 and, after reconfiguration with another prime, N = 16: FWD against
// the direct sum, INV back to the input, AUTO against the index map i ->
// i*g mod 2N with sign, and the FWD cycle count.
//
// Interface: none, this is a top-level testbench; the device under test
// is cg_ntt (with otf_gen).  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 200000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_cg_ntt;
  import fhe_pkg::*;
  localparam int LN = 8;
  localparam int MAXLG = 6;

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

  cg_ntt #(.LN(LN), .MAXLG(MAXLG)) dut (
    .clk, .rst_n, .cfg_start, .cfg_q(cq), .cfg_mu(cmu), .cfg_psi(cpsi), .cfg_psi_inv(cpsii),
    .cfg_ninv(cninv), .cfg_ready, .logn, .ld_valid, .ld_row, .ld_data, .rd_row, .rd_data,
    .start, .mode, .galois, .busy);

  int checks = 0, failures = 0;

  function automatic word_t mm(word_t a, word_t b, word_t q);
    logic [2*W-1:0] p; p = a * b; return word_t'(p % q);
  endfunction
  function automatic word_t pw(word_t b, longint unsigned e, word_t q);
    word_t r = 1;
    while (e != 0) begin if (e[0]) r = mm(r, b, q); b = mm(b, b, q); e >>= 1; end
    return r;
  endfunction

  word_t x [64], y [64], ref_v [64];

  task automatic configure(word_t q, word_t p, word_t pi, word_t ni);
    logic [2*W+1:0] t;
    t = (2*W+2)'(1) << (2*W);
    cq = q; cmu = mu_t'(t / q); cpsi = p; cpsii = pi; cninv = ni;
    @(negedge clk) cfg_start = 1; @(negedge clk) cfg_start = 0;
    while (!cfg_ready) @(negedge clk);
  endtask

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

  task automatic compare(int n, string what);
    int bad;
    bad = 0;
    for (int i = 0; i < n; i++) if (y[i] !== ref_v[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d words differ (y[1]=%0d ref=%0d)", what, bad, y[1], ref_v[1]); end
  endtask

  task automatic test_size(int lgn, word_t q, word_t p, word_t pi, word_t ni);
    int n, cyc, g, bound;
    n = 1 << lgn; logn = 5'(lgn);
    configure(q, p, pi, ni);
    for (int i = 0; i < n; i++) x[i] = word_t'({$urandom, $urandom}) % q;
    // forward
    for (int k = 0; k < n; k++) begin
      ref_v[k] = 0;
      for (int i = 0; i < n; i++)
        ref_v[k] = mod_add(ref_v[k], mm(x[i], pw(p, longint'(i) * (2*k + 1), q), q), q);
    end
    load(n); run(NTT_FWD, 0, cyc); unload(n);
    compare(n, $sformatf("FWD N=%0d", n));
    // cycle count: issue cycles plus a drain of at most 8 per pass
    bound = 2*n/LN + lgn*(n/LN) + 8*(lgn+1) + 2;
    checks++;
    if (cyc > bound || cyc < 2*n/LN + lgn*(n/LN)) begin
      failures++; $display("FAIL FWD cycles %0d bound %0d", cyc, bound);
    end
    // inverse returns the input
    for (int i = 0; i < n; i++) ref_v[i] = x[i];
    run(NTT_INV, 0, cyc); unload(n);
    compare(n, $sformatf("INV N=%0d", n));
    // automorphism X -> X^g, g = 5^3 mod 2N
    g = 125 % (2*n);
    for (int i = 0; i < n; i++) begin
      int d; d = (i * g) % (2*n);
      if (d < n) ref_v[d] = x[i]; else ref_v[d-n] = (x[i] == 0) ? 0 : q - x[i];
    end
    run(NTT_AUTO, g, cyc); unload(n);
    compare(n, $sformatf("AUTO N=%0d", n));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    test_size(6, 36'd68719474049, 36'd35524313727, 36'd34650432514, 36'd67645732267);
    test_size(4, 36'd68719476577, 36'd29530886214, 36'd18348986349, 36'd64424509291);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
