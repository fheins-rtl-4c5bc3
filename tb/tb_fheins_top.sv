// tb_fheins_top: end-to-end run of a reduced fabric (8 lanes, 2 MODUs, 1
// NTT and 1 BCONV engine per accelerator, 2 channel-level accelerators of 2
// channels each, N = 16) through fheins_driver: conventional I/O, mode
// switch, broadcast, per-channel kernels, gathering and aggregation,
// checked against reference values.
//
// Interface: none, this is a top-level testbench; the device under test
// is fheins_top via fheins_driver.  Timing: 10 ns clock; inputs are driven and outputs
// sampled on the falling edge so they never race the DUT's rising-edge
// registers; a watchdog ends the run as a failure after 200000 cycles.
// Ends with one line "TB_RESULT checks=<n> failures=<n>" and $finish.
// Expected values come from plain % arithmetic written here, not from
// the DUT's own datapath; primes, seeds and stimulus are this
// testbench's choice, the document gives no test vectors.
module tb_fheins_top;
  import fhe_pkg::*;
  localparam int LN = 8, NB = 2, NACC = 2, K = 2, LGN = 4, GB_ROWS = 16;
  localparam int NCH = NACC * K;
  logic clk, rst_n, mode, gb_we, gb_st_start, gb_busy, start, done_all, res_valid, res_ready;
  logic md_prog_we, md_cst_we, md_seed_we;
  logic [4:0] logn;
  logic [NCH-1:0] ch_valid, ch_ready, io_valid, io_ready;
  logic [NCH-1:0][7:0] ch_data, io_data;
  logic [$clog2(NACC+1)-1:0] md_sel;
  logic [7:0] md_addr;
  instr_t md_prog;
  const_t md_cst;
  logic [63:0] md_seed;
  logic [$clog2(GB_ROWS)-1:0] gb_addr, gb_st_base;
  logic [$clog2(GB_ROWS):0] gb_st_count;
  logic [NACC:0] gb_dst_mask, acc_done, bc_multi;
  word_t [LN-1:0] gb_data, res_data;
  logic [NACC-1:0][31:0] agg_stall_cnt;
  logic [31:0] noc_contention_cnt;
  logic [NACC-1:0][2:0] ev_ntt;
  logic [NACC-1:0] ev_bconv, ev_prng, ev_key;

  fheins_top #(.LN(LN), .NB(NB), .NNTT(1), .NBC(1), .MAXLG(6), .NACC(NACC), .K(K), .SROWS_CH(40), .SROWS_SSD(40), .KROWS(4), .GB_ROWS(GB_ROWS)) dut (.*);

  assign bc_multi = dut.bc_valid;
  for (genvar a = 0; a < NACC; a++) begin : g_ev
    assign ev_ntt[a][0] = (|dut.g_acc[a].u_acc.n_start) && dut.g_acc[a].u_acc.ir.nmode == NTT_FWD;
    assign ev_ntt[a][1] = (|dut.g_acc[a].u_acc.n_start) && dut.g_acc[a].u_acc.ir.nmode == NTT_INV;
    assign ev_ntt[a][2] = (|dut.g_acc[a].u_acc.n_start) && dut.g_acc[a].u_acc.ir.nmode == NTT_AUTO;
    assign ev_bconv[a]  = dut.g_acc[a].u_acc.bc_ov[0];
    assign ev_prng[a]   = dut.g_acc[a].u_acc.prng_en;
    assign ev_key[a]    = dut.g_acc[a].u_acc.pend && dut.g_acc[a].u_acc.ir.op == OP_VOP &&
                          dut.g_acc[a].u_acc.ir.sel == SEL_KEY;
  end

  fheins_driver #(.LN(LN), .NB(NB), .NACC(NACC), .K(K), .LGN(LGN), .GB_ROWS(GB_ROWS)) drv (.*);

  initial begin
    repeat (200000) @(posedge clk);
    drv.failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
