// tb_chan_agg: four channels send bytes at different random rates; each
// assembled row must hold, in slice k, the words channel k sent (five bytes
// per word, least significant first). The consumer stalls at times, so
// channels that finish their slice early must be held off; the stall
// counter has to see that happen.
//
// Interface: none, this is a top-level testbench; the device under test
// is chan_agg.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_chan_agg;
  import fhe_pkg::*;
  localparam int LN = 8, K = 4, SW = LN / K, BPW = 5, NROWS = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [K-1:0] ch_valid = '0, ch_ready;
  logic [K-1:0][7:0] ch_data;
  logic out_valid, out_ready = 0;
  word_t [LN-1:0] out_data;
  logic [31:0] stall_cnt;
  chan_agg #(.LN(LN), .K(K)) dut (.clk, .rst_n, .ch_valid, .ch_ready, .ch_data, .out_valid,
    .out_ready, .out_data, .stall_cnt);
  int checks = 0, failures = 0;
  word_t rows [NROWS][LN];
  int pos [K];         // bytes sent per channel
  int nrow = 0;

  initial begin
    for (int r = 0; r < NROWS; r++) for (int l = 0; l < LN; l++) rows[r][l] = word_t'({$urandom, $urandom});
    for (int k = 0; k < K; k++) pos[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
  end

  function automatic logic [7:0] byte_of(int k, int p);
    int r, w, b;
    logic [39:0] v;
    r = p / (SW * BPW); w = (p % (SW * BPW)) / BPW; b = p % BPW;
    v = 40'(rows[r][k*SW + w]);
    return v[b*8 +: 8];
  endfunction

  // channels: channel k offers a byte with probability (k+1)/4
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < K; k++) begin
      if (ch_valid[k] && ch_ready_q[k]) pos[k]++;
      ch_valid[k] = (pos[k] < NROWS * SW * BPW) && (($urandom % 4) <= k);
      if (ch_valid[k]) ch_data[k] = byte_of(k, pos[k]);
    end
    out_ready = ($urandom % 3) != 0;
  end
  logic [K-1:0] ch_ready_q;
  always @(posedge clk) ch_ready_q <= ch_ready;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int bad;
    bad = 0;
    for (int l = 0; l < LN; l++) if (out_data[l] !== rows[nrow][l]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL row %0d", nrow); end
    nrow++;
  end

  initial begin
    wait (nrow == NROWS);
    repeat (2) @(negedge clk);
    checks++;
    if (stall_cnt == 0) begin failures++; $display("FAIL no channel stall seen"); end
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
