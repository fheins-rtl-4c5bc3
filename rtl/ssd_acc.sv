// ssd_acc: SSD-level HE accelerator ("envelope engine").
//
// Performs the steps that need data from every channel: aggregation of
// the partial results of the channel-level accelerators (for example the
// HAdd of per-channel selections in PIR, or the packing of per-channel
// similarity scores in SSC) and the final preparation of the result for
// the host.  It is an he_acc with the larger 13 MB scratchpad whose data
// stream comes from the on-chip network: a noc_gather arbitrates the NIN
// channel-level result streams round-robin onto the accelerator's data
// input, so a RECV instruction collects rows from whichever channel
// accelerators have them.  The broadcast input carries rows from the global
// buffer (keys, query), the output stream goes towards the host.
// From the document: a separate SSD-level accelerator with 13 MB SRAM and
// the same unit mix, fed from all channels.  The gather network and the
// reuse of the channel-level datapath are this design's choice.

module ssd_acc
  import fhe_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned NB    = NUM_MODU,
  parameter int unsigned NNTT  = NUM_NTT,
  parameter int unsigned NBC   = NUM_BCONV,
  parameter int unsigned MAXLG = MAX_LOGN,
  parameter int unsigned NIN   = 4,
  parameter int unsigned SROWS = 2958,        // 13 MB scratchpad
  parameter int unsigned KROWS = 56
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [4:0]               logn,
  input  logic                     prog_we,
  input  logic [7:0]               prog_addr,
  input  instr_t                   prog_data,
  input  logic                     cst_we,
  input  logic [7:0]               cst_addr,
  input  const_t                   cst_data,
  input  logic                     seed_we,
  input  logic [63:0]              seed,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  logic [NIN-1:0]           g_valid,
  output logic [NIN-1:0]           g_ready,
  input  word_t [NIN-1:0][LN-1:0]  g_data,
  input  logic                     bin_valid,
  output logic                     bin_ready,
  input  word_t [LN-1:0]           bin_data,
  output logic                     dout_valid,
  input  logic                     dout_ready,
  output word_t [LN-1:0]           dout_data,
  output logic [31:0]              contention_cnt
);
  logic           n_valid, n_ready;
  word_t [LN-1:0] n_data;
  logic [((NIN > 1) ? $clog2(NIN) : 1)-1:0] n_src;
  logic [3:0] src4;
  assign src4 = 4'(n_src);

  noc_gather #(.LN(LN), .NIN(NIN)) u_noc (
    .clk, .rst_n, .in_valid(g_valid), .in_ready(g_ready), .in_data(g_data),
    .out_valid(n_valid), .out_ready(n_ready), .out_data(n_data), .out_src(n_src));

  he_acc #(.LN(LN), .NB(NB), .NNTT(NNTT), .NBC(NBC), .MAXLG(MAXLG),
           .SROWS(SROWS), .KROWS(KROWS)) u_acc (
    .clk, .rst_n, .logn, .prog_we, .prog_addr, .prog_data, .cst_we, .cst_addr, .cst_data,
    .seed_we, .seed, .start, .busy, .done,
    .din_valid(n_valid), .din_ready(n_ready), .din_data(n_data), .din_src(src4),
    .bin_valid, .bin_ready, .bin_data, .dout_valid, .dout_ready, .dout_data);

  // cycles in which more than one channel accelerator wanted the link
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) contention_cnt <= '0;
    else if ($countones(g_valid) > 1) contention_cnt <= contention_cnt + 1'b1;
  end
endmodule
