// tb_modu: random rows through the vector MODU with the three ops mixed
// from cycle to cycle; checks every lane against % arithmetic, the tag, the
// issue order and the fixed latency of three cycles.
//
// Interface: none, this is a top-level testbench; the device under test
// is modu.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_modu;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  modu_op_e op;
  word_t [LN-1:0] a, b, y;
  word_t q = 36'd68719476577;
  mu_t mu;
  logic [15:0] in_tag, out_tag;
  modu #(.LN(LN), .TAG_W(16)) dut (.clk, .rst_n, .in_valid, .op, .a, .b, .q, .mu, .in_tag, .out_valid, .y, .out_tag);

  int checks = 0, failures = 0;
  word_t [LN-1:0] exp_y [$];
  int exp_t [$], exp_c [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    mu = ref_mu(q);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      word_t [LN-1:0] e;
      @(negedge clk);
      op = modu_op_e'(i % 3);
      for (int l = 0; l < LN; l++) begin
        a[l] = word_t'({$urandom, $urandom}) % q;
        b[l] = (i % 11 == 0) ? a[l] : word_t'({$urandom, $urandom}) % q;
        case (op)
          MOP_ADD: e[l] = word_t'((({1'b0, a[l]}) + b[l]) % q);
          MOP_SUB: e[l] = word_t'((({1'b0, a[l]}) + q - b[l]) % q);
          default: e[l] = ref_mm(a[l], b[l], q);
        endcase
      end
      in_valid = (i % 4) != 3; in_tag = 16'(i);
      if (in_valid) begin exp_y.push_back(e); exp_t.push_back(i); exp_c.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d rows missing", exp_y.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      word_t [LN-1:0] e; int t, c;
      e = exp_y.pop_front(); t = exp_t.pop_front(); c = exp_c.pop_front();
      checks++;
      if (y !== e || out_tag !== 16'(t) || cyc - c != 3) begin
        failures++; $display("FAIL row %0d (latency %0d)", t, cyc - c);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
