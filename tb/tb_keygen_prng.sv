// tb_keygen_prng: seeds the generator and compares many rows with an
// xorshift64 model of each lane; also checks that the state holds while en
// is low and that every output is below q.
//
// Interface: none, this is a top-level testbench; the device under test
// is keygen_prng.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_keygen_prng;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load = 0, en = 0;
  logic [63:0] seed = 64'hDEAD_BEEF_0BAD_F00D;
  word_t q = 36'd68719476577;
  word_t [LN-1:0] y;
  keygen_prng #(.LN(LN)) dut (.clk, .rst_n, .seed_load, .seed, .en, .q, .y);
  int checks = 0, failures = 0;
  logic [63:0] st [LN];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    for (int l = 0; l < LN; l++) st[l] = seed ^ (64'(l + 1) * 64'h9E37_79B9_7F4A_7C15);
    for (int i = 0; i < 300; i++) begin
      int bad;
      bad = 0;
      en = (i % 4) != 0;
      #1;
      for (int l = 0; l < LN; l++) if (y[l] !== ref_prng(st[l], q) || y[l] >= q) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL row %0d", i); end
      @(negedge clk);
      if (en) for (int l = 0; l < LN; l++) st[l] = ref_xs(st[l]);
    end
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
