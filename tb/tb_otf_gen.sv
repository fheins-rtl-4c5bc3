// tb_otf_gen: fills the seed tables for a 2^8 ring and requests random
// exponents from both directions; every twiddle must equal psi^e or psi^-e
// computed here by square-and-multiply, three cycles after the request.
// Also bounds the table-fill time.
//
// Interface: none, this is a top-level testbench; the device under test
// is otf_gen.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_otf_gen;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int NS = 4, MAXLG = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_start = 0, ready, req_valid = 0, req_inv, tw_valid;
  word_t q = 36'd68719476577;   // psi below: primitive 32nd root, order divides 2^MAXLG
  word_t psi = 36'd29530886214, psii = 36'd18348986349;
  mu_t mu;
  logic [NS-1:0][MAXLG-1:0] req_exp;
  word_t [NS-1:0] tw;
  otf_gen #(.NS(NS), .MAXLG(MAXLG)) dut (.clk, .rst_n, .cfg_start, .cfg_psi(psi), .cfg_psi_inv(psii),
    .q, .mu, .ready, .req_valid, .req_inv, .req_exp, .tw_valid, .tw);

  int checks = 0, failures = 0;
  word_t [NS-1:0] exp_tw [$];

  initial begin
    int fill;
    mu = ref_mu(q);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0; fill = 1;
    while (!ready) begin @(negedge clk); fill++; end
    checks++;
    if (fill > 5 * 2 * (16 + 16) + 8) begin failures++; $display("FAIL fill took %0d", fill); end
    for (int i = 0; i < 200; i++) begin
      word_t [NS-1:0] e;
      @(negedge clk);
      req_valid = (i % 3) != 2; req_inv = i[0];
      for (int k = 0; k < NS; k++) begin
        req_exp[k] = MAXLG'($urandom);
        e[k] = ref_pw(req_inv ? psii : psi, longint'(req_exp[k]), q);
      end
      if (req_valid) exp_tw.push_back(e);
    end
    @(negedge clk); req_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_tw.size() != 0) begin failures++; $display("FAIL missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (tw_valid) begin
    word_t [NS-1:0] e;
    e = exp_tw.pop_front();
    checks++;
    if (tw !== e) begin failures++; $display("FAIL tw %0d vs %0d", tw[0], e[0]); end
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
