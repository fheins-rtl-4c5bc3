// tb_bconv: converts random rows of L = 3 limbs to one target prime and
// compares with sum_i (x_i*qhatinv_i mod q_i)*(qhat_i mod p) mod p computed
// with % arithmetic; back-to-back conversions, the result must appear seven
// cycles after the last limb.
//
// Interface: none, this is a top-level testbench; the device under test
// is bconv.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_bconv;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = 8, L = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  word_t [LN-1:0] x, y;
  word_t qi, qhatinv, qhat_mod_p;
  mu_t mui, mup;
  word_t p = 36'd68718428161;
  word_t qs [L] = '{36'd68719476577, 36'd68719474049, 36'd68719403009};
  bconv #(.LN(LN)) dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .x, .qi, .mui, .qhatinv,
    .qhat_mod_p, .p, .mup, .out_valid, .y);

  int checks = 0, failures = 0;
  word_t [LN-1:0] exp_y [$];
  int exp_c [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    mup = ref_mu(p);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      word_t [LN-1:0] acc;
      acc = '0;
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == L-1);
        qi = qs[i]; mui = ref_mu(qi);
        qhatinv = word_t'({$urandom, $urandom}) % qi;
        qhat_mod_p = word_t'({$urandom, $urandom}) % p;
        for (int l = 0; l < LN; l++) begin
          x[l] = word_t'({$urandom, $urandom}) % qi;
          acc[l] = mod_add(acc[l], ref_mm(ref_mm(x[l], qhatinv, qi), qhat_mod_p, p), p);
        end
        if (i == L-1) begin exp_y.push_back(acc); exp_c.push_back(cyc); end
      end
      if (t % 5 == 4) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL missing %0d", exp_y.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (out_valid) begin
    word_t [LN-1:0] e; int c;
    e = exp_y.pop_front(); c = exp_c.pop_front();
    checks++;
    if (y !== e || cyc - c != 7) begin failures++; $display("FAIL y %0d vs %0d lat %0d", y[0], e[0], cyc - c); end
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
