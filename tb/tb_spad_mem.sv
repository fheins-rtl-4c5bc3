// tb_spad_mem: writes superrows with random slice masks and checks both
// read ports against a model array, including the one-cycle read latency
// and read-before-write on a same-address collision.
//
// Interface: none, this is a top-level testbench; the device under test
// is spad_mem.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 100000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_spad_mem;
  import fhe_pkg::*;
  localparam int LN = 4, NB = 4, SROWS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] ra_addr, rb_addr, w_addr;
  word_t [NB-1:0][LN-1:0] ra_data, rb_data, w_data, model [SROWS], ea, eb;
  logic w_en;
  logic [NB-1:0] w_mask;
  spad_mem #(.LN(LN), .NB(NB), .SROWS(SROWS)) dut (.clk, .ra_addr, .ra_data, .rb_addr, .rb_data,
    .w_en, .w_addr, .w_mask, .w_data);
  int checks = 0, failures = 0;
  initial begin
    // initialise every superrow
    for (int r = 0; r < SROWS; r++) begin
      @(negedge clk); w_en = 1; w_addr = 4'(r); w_mask = '1;
      for (int b = 0; b < NB; b++) for (int l = 0; l < LN; l++) w_data[b][l] = word_t'({$urandom, $urandom});
      model[r] = w_data;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ra_addr = 4'($urandom); rb_addr = (i % 9 == 0) ? w_addr : 4'($urandom);
      ea = model[ra_addr]; eb = model[rb_addr];
      w_en = $urandom % 2; w_addr = 4'($urandom); w_mask = NB'($urandom);
      if (i % 7 == 0) w_addr = ra_addr;
      for (int b = 0; b < NB; b++) for (int l = 0; l < LN; l++) w_data[b][l] = word_t'({$urandom, $urandom});
      if (w_en) for (int b = 0; b < NB; b++) if (w_mask[b]) model[w_addr][b] = w_data[b];
      @(negedge clk);
      checks++;
      if (ra_data !== ea || rb_data !== eb) begin failures++; $display("FAIL read %0d", i); end
      w_en = 0;
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
