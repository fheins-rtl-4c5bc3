// tb_ssd_acc: two channel-level result streams arrive at random times on
// the gather network; the SSD-level accelerator's schedule files them by
// source, adds them slot-wise (the cross-channel aggregation) and sends the
// sum out. Checks the sum against % arithmetic and that both sources
// competed for the link at least once.
//
// Interface: none, this is a top-level testbench; the device under test
// is ssd_acc.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 50000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_ssd_acc;
  import fhe_pkg::*;
  `include "tb_common.svh"
  localparam int LN = 8, NB = 2, NIN = 2, R = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, cst_we = 0, start = 0, busy, done;
  logic [7:0] prog_addr, cst_addr;
  instr_t prog_data;
  const_t cst_data;
  logic [NIN-1:0] g_valid = '0, g_ready;
  word_t [NIN-1:0][LN-1:0] g_data;
  logic dout_valid, dout_ready = 1;
  word_t [LN-1:0] dout_data, bin_data = '0;
  logic [31:0] contention_cnt;
  localparam word_t Q = 36'd68719476577;

  ssd_acc #(.LN(LN), .NB(NB), .NNTT(1), .NBC(1), .MAXLG(6), .NIN(NIN), .SROWS(16), .KROWS(4)) dut (
    .clk, .rst_n, .logn(5'd4), .prog_we, .prog_addr, .prog_data, .cst_we, .cst_addr, .cst_data,
    .seed_we(1'b0), .seed(64'd0), .start, .busy, .done, .g_valid, .g_ready, .g_data,
    .bin_valid(1'b0), .bin_ready(), .bin_data, .dout_valid, .dout_ready, .dout_data, .contention_cnt);

  int checks = 0, failures = 0, ninstr = 0;
  word_t X [NIN][R][LN];
  int sent [NIN];

  task automatic put(opcode_e op, sel_e sel, modu_op_e mop, int a, int b, int d, int n);
    @(negedge clk); prog_we = 1; prog_addr = 8'(ninstr); ninstr++;
    prog_data = '{op: op, unit: 3'd0, sel: sel, mop: mop, nmode: NTT_FWD, a: 16'(a), b: 16'(b),
                  d: 16'(d), n: 16'(n), cidx: 8'd0};
    @(negedge clk); prog_we = 0;
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NIN; s++) begin
      if (g_valid[s] && g_taken[s]) sent[s]++;
      if (!g_valid[s] || g_taken[s]) begin
        g_valid[s] = (sent[s] < R) && ($urandom % 2 == 0 || sent[s] == 0);
        for (int l = 0; l < LN; l++) g_data[s][l] = X[s][sent[s] % R][l];
      end
    end
  end
  logic [NIN-1:0] g_taken;
  always @(posedge clk) g_taken <= g_valid & g_ready;

  initial begin
    int row;
    for (int s = 0; s < NIN; s++) begin
      sent[s] = 0;
      for (int r = 0; r < R; r++) for (int l = 0; l < LN; l++) X[s][r][l] = word_t'({$urandom, $urandom}) % Q;
    end
    @(negedge clk); cst_we = 1; cst_addr = 0; cst_data = '{q: Q, mu: ref_mu(Q), c: 0};
    @(negedge clk); cst_we = 0;
    put(OP_RECV, SEL_CONST, MOP_ADD, 0, NIN, 0, R);
    put(OP_VOP,  SEL_SPAD,  MOP_ADD, 0, R, 2*R, R/NB);
    put(OP_SEND, SEL_SPAD,  MOP_ADD, 2*R, 0, 0, R);
    put(OP_END,  SEL_SPAD,  MOP_ADD, 0, 0, 0, 0);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    row = 0;
    while (row < R) begin
      @(posedge clk);
      if (dout_valid && dout_ready) begin
        int bad;
        bad = 0;
        for (int l = 0; l < LN; l++) if (dout_data[l] !== mod_add(X[0][row][l], X[1][row][l], Q)) bad++;
        checks++;
        if (bad != 0) begin failures++; $display("FAIL row %0d", row); end
        row++;
      end
    end
    while (!done) @(posedge clk);
    checks++;
    if (contention_cnt == 0) begin failures++; $display("FAIL no contention on the gather link"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
