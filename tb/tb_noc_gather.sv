// tb_noc_gather: four sources each send a numbered sequence of rows at
// random times into the gather network while the sink stalls at random.
// Checks per-source order and content, the source index, that nothing is
// lost, that the grant is fair (no source waits more than NIN grants while
// requesting) and that contention actually occurred.
//
// Interface: none, this is a top-level testbench; the device under test
// is noc_gather.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_noc_gather;
  import fhe_pkg::*;
  localparam int LN = 4, NIN = 4, PER = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NIN-1:0] in_valid = '0, in_ready;
  word_t [NIN-1:0][LN-1:0] in_data;
  logic out_valid, out_ready = 0;
  word_t [LN-1:0] out_data;
  logic [1:0] out_src;
  noc_gather #(.LN(LN), .NIN(NIN)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
    .out_ready, .out_data, .out_src);
  int checks = 0, failures = 0;
  int sent [NIN], recv [NIN], waitg [NIN];
  int contention = 0, total = 0;

  function automatic word_t [LN-1:0] row_of(int s, int n);
    word_t [LN-1:0] r;
    for (int l = 0; l < LN; l++) r[l] = word_t'(s * 100000 + n * 10 + l);
    return r;
  endfunction

  initial begin
    for (int s = 0; s < NIN; s++) begin sent[s] = 0; recv[s] = 0; waitg[s] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if ($countones(in_valid) > 1) contention++;
    for (int s = 0; s < NIN; s++) begin
      if (in_valid[s] && in_ready[s]) begin sent[s]++; waitg[s] = 0; end
      else if (in_valid[s] && in_ready != 0) begin
        waitg[s]++;
        if (waitg[s] > NIN) begin failures++; $display("FAIL source %0d starved", s); end
      end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== row_of(out_src, recv[out_src])) begin failures++; $display("FAIL src %0d row %0d", out_src, recv[out_src]); end
      recv[out_src]++; total++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NIN; s++) begin
      if (!in_valid[s] || in_ready_q[s]) begin
        in_valid[s] = (sent[s] < PER) && ($urandom % 3 != 0);
        in_data[s] = row_of(s, sent[s]);
      end
    end
    out_ready = ($urandom % 4) != 0;
  end
  logic [NIN-1:0] in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready & in_valid;

  initial begin
    wait (total == NIN * PER);
    repeat (3) @(negedge clk);
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention"); end
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
