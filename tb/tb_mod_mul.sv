// tb_mod_mul: random and corner-case products through the Barrett lane,
// compared with a*b % q, including the latency of three cycles.
//
// Interface: none, this is a top-level testbench; the device under test
// is mod_mul.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 200000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_mod_mul;
  import fhe_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  word_t a, b, q, r;
  mu_t mu;
  logic [15:0] in_tag, out_tag;
  mod_mul #(.TAG_W(16)) dut (.clk, .rst_n, .in_valid, .a, .b, .q, .mu, .in_tag, .out_valid, .r, .out_tag);

  int checks = 0, failures = 0;
  word_t exp_q [$];
  int    exp_t [$];
  word_t qs [3] = '{36'd68719476577, 36'd68718428161, 36'd68719403009};

  initial begin
    int cyc = 0, first_in = -1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      cyc++;
      q = qs[i % 3]; mu = ref_mu(q);
      case (i % 7)
        0: begin a = q - 1; b = q - 1; end
        1: begin a = 0; b = word_t'({$urandom, $urandom}) % q; end
        default: begin a = word_t'({$urandom, $urandom}) % q; b = word_t'({$urandom, $urandom}) % q; end
      endcase
      in_valid = (i % 5) != 4;
      in_tag = 16'(i);
      if (in_valid) begin
        exp_q.push_back(ref_mm(a, b, q)); exp_t.push_back(i);
        if (first_in < 0) first_in = cyc;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    // latency: one isolated product must appear after exactly three edges
    q = qs[0]; mu = ref_mu(q); a = 36'd123456789; b = 36'd987654321; in_tag = 16'hBEEF;
    exp_q.push_back(ref_mm(a, b, q)); exp_t.push_back(16'hBEEF);
    in_valid = 1;
    @(negedge clk); in_valid = 0;
    begin
      int lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      word_t e; int t;
      e = exp_q.pop_front(); t = exp_t.pop_front();
      checks++;
      if (r !== e || out_tag !== 16'(t)) begin failures++; $display("FAIL tag %0d r=%0d exp=%0d", t, r, e); end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
