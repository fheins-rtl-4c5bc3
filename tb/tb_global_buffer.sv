// tb_global_buffer: fills the buffer, streams ranges out with a consumer
// that stalls at random, and checks order, content and count of the rows,
// and the rate of one row per two cycles when the consumer never stalls.
//
// Interface: none, this is a top-level testbench; the device under test
// is global_buffer.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_global_buffer;
  import fhe_pkg::*;
  localparam int LN = 4, ROWS = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, st_start = 0, st_busy, out_valid, out_ready = 1;
  logic [4:0] wr_addr, st_base;
  logic [5:0] st_count;
  word_t [LN-1:0] wr_data, out_data, model [ROWS];
  global_buffer #(.LN(LN), .ROWS(ROWS)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .st_start,
    .st_base, .st_count, .st_busy, .out_valid, .out_ready, .out_data);
  int checks = 0, failures = 0;
  int expect_idx = 0, got = 0, random_stall = 0;
  always @(negedge clk) if (random_stall) out_ready = $urandom % 3 != 0; else out_ready = 1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data !== model[expect_idx]) begin failures++; $display("FAIL row %0d", expect_idx); end
    expect_idx++; got++;
  end
  task automatic stream(int base, int count, output int cycles);
    @(negedge clk); st_start = 1; st_base = 5'(base); st_count = 6'(count); expect_idx = base; got = 0;
    @(negedge clk); st_start = 0; cycles = 1;
    while (st_busy) begin @(negedge clk); cycles++; end
    checks++;
    if (got != count) begin failures++; $display("FAIL got %0d of %0d", got, count); end
  endtask
  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wr_en = 1; wr_addr = 5'(r);
      for (int l = 0; l < LN; l++) wr_data[l] = word_t'({$urandom, $urandom});
      model[r] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    stream(3, 20, cyc);
    checks++;
    if (cyc > 2 * 20 + 2) begin failures++; $display("FAIL rate %0d cycles", cyc); end
    random_stall = 1;
    stream(0, 32, cyc);
    stream(17, 9, cyc);
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
