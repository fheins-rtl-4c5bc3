// tb_bru: drives random readiness on four consumers and random masks; a row
// may pass only when every masked consumer is ready, every masked consumer
// must see it in that cycle, unmasked ones never.
//
// Interface: none, this is a top-level testbench; the device under test
// is bru.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure if it stalls.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_bru;
  import fhe_pkg::*;
  localparam int LN = 4, NOUT = 4;
  logic in_valid, in_ready;
  word_t [LN-1:0] in_data, out_data;
  logic [NOUT-1:0] dst_mask, out_valid, out_ready;
  bru #(.LN(LN), .NOUT(NOUT)) dut (.in_valid, .in_ready, .in_data, .dst_mask, .out_valid, .out_ready, .out_data);
  int checks = 0, failures = 0, passed = 0;
  initial begin
    for (int i = 0; i < 500; i++) begin
      logic exp_ready;
      in_valid = $urandom % 4 != 0;
      dst_mask = NOUT'($urandom);
      out_ready = NOUT'($urandom) | NOUT'($urandom);
      for (int l = 0; l < LN; l++) in_data[l] = word_t'($urandom);
      #1;
      exp_ready = (dst_mask != 0) && ((out_ready & dst_mask) == dst_mask);
      checks++;
      if (in_ready !== exp_ready || out_valid !== ((in_valid && exp_ready) ? dst_mask : '0) ||
          out_data !== in_data) begin
        failures++; $display("FAIL step %0d", i);
      end
      if (in_valid && exp_ready) passed++;
      #1;
    end
    checks++;
    if (passed == 0) begin failures++; $display("FAIL no broadcast happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
