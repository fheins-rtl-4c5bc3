// fheins_top: FHE compute fabric of the in-storage processing SSD controller.
//
// Encrypted databases are too large for host memory, so the homomorphic
// kernels run inside the SSD, after the per-channel flash controllers and
// their ECC, where the aggregate channel bandwidth is far above the PCIe
// link.  NACC channel-level HE accelerators each take K flash channels,
// concatenated by a chan_agg into lane-wide rows; a global buffer holds
// data all accelerators share (query ciphertext, keys), which the
// broadcast unit (BrU) delivers to every accelerator at once and to the
// SSD-level accelerator; the channel accelerators' results travel over
// the on-chip network to the SSD-level accelerator, which combines them
// and streams the final ciphertext towards the host.
//
// Two modes, as the document describes them:
//   mode = 0, conventional I/O : flash channel bytes go straight to the
//             host path (io_*), the accelerators see nothing;
//   mode = 1, FHE acceleration : flash channel bytes feed the accelerators.
// The host interface, embedded cores, DRAM controller and flash
// controllers are outside this block: their traffic enters as ports.
// Metadata (schedules, constants, PRNG seeds) produced offline by the host
// is written through md_*; md_sel picks the accelerator (NACC = SSD-level).
// start launches every accelerator's schedule; done_all rises when all
// have reached OP_END.
// Defaults follow the SSD-S configuration: 16 channels, 4 channel-level
// accelerators (K = 4).  SSD-L is NACC = 8 with 32 channels.
//
// Lint note: every register resets asynchronously on rst_n; the tool also
// sees rst_n in the disable condition of the mode-stability assertion and
// reports that as a synchronous use.
module fheins_top
  import fhe_pkg::*;
#(
  parameter int unsigned LN        = LANES,
  parameter int unsigned NB        = NUM_MODU,
  parameter int unsigned NNTT      = NUM_NTT,
  parameter int unsigned NBC       = NUM_BCONV,
  parameter int unsigned MAXLG     = MAX_LOGN,
  parameter int unsigned NACC      = 4,
  parameter int unsigned K         = 4,
  parameter int unsigned NCH       = NACC * K,
  parameter int unsigned SROWS_CH  = 1592,    // 7 MB per channel-level accelerator
  parameter int unsigned SROWS_SSD = 2958,    // 13 MB SSD-level accelerator
  parameter int unsigned KROWS     = 56,      // 256 KB Galois key buffer
  parameter int unsigned GB_ROWS   = 1024,
  parameter int unsigned GAW       = $clog2(GB_ROWS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode,            // 0 conventional I/O, 1 FHE
  input  logic [4:0]               logn,
  // flash channels (after the flash controllers / ECC)
  input  logic [NCH-1:0]           ch_valid,
  output logic [NCH-1:0]           ch_ready,
  input  logic [NCH-1:0][7:0]      ch_data,
  // conventional I/O path towards the host
  output logic [NCH-1:0]           io_valid,
  input  logic [NCH-1:0]           io_ready,
  output logic [NCH-1:0][7:0]      io_data,
  // metadata from the host / SSD DRAM
  input  logic [$clog2(NACC+1)-1:0] md_sel,
  input  logic                     md_prog_we,
  input  logic                     md_cst_we,
  input  logic                     md_seed_we,
  input  logic [7:0]               md_addr,
  input  instr_t                   md_prog,
  input  const_t                   md_cst,
  input  logic [63:0]              md_seed,
  // global buffer
  input  logic                     gb_we,
  input  logic [GAW-1:0]           gb_addr,
  input  word_t [LN-1:0]           gb_data,
  input  logic                     gb_st_start,
  input  logic [GAW-1:0]           gb_st_base,
  input  logic [GAW:0]             gb_st_count,
  input  logic [NACC:0]            gb_dst_mask,     // bit NACC = SSD-level
  output logic                     gb_busy,
  // control
  input  logic                     start,
  output logic [NACC:0]            acc_done,
  output logic                     done_all,
  // result towards the host
  output logic                     res_valid,
  input  logic                     res_ready,
  output word_t [LN-1:0]           res_data,
  // monitoring
  output logic [NACC-1:0][31:0]    agg_stall_cnt,
  output logic [31:0]              noc_contention_cnt
);
  // ---------------- mode switch ----------------
  localparam int unsigned SW = $clog2(NACC+1);
  localparam logic [SW-1:0] SSD_SEL = SW'(NACC);

  logic [NCH-1:0] acc_ch_valid, acc_ch_ready;
  assign acc_ch_valid = mode ? ch_valid : '0;
  assign io_valid     = mode ? '0 : ch_valid;
  assign io_data      = ch_data;
  assign ch_ready     = mode ? acc_ch_ready : io_ready;

  // ---------------- global buffer and broadcast ----------------
  logic           gb_valid, gb_ready;
  word_t [LN-1:0] gb_row;
  logic [NACC:0]  bc_valid, bc_ready;
  word_t [LN-1:0] bc_data;

  global_buffer #(.LN(LN), .ROWS(GB_ROWS)) u_gb (
    .clk, .rst_n, .wr_en(gb_we), .wr_addr(gb_addr), .wr_data(gb_data),
    .st_start(gb_st_start), .st_base(gb_st_base), .st_count(gb_st_count), .st_busy(gb_busy),
    .out_valid(gb_valid), .out_ready(gb_ready), .out_data(gb_row));

  bru #(.LN(LN), .NOUT(NACC+1)) u_bru (
    .in_valid(gb_valid), .in_ready(gb_ready), .in_data(gb_row), .dst_mask(gb_dst_mask),
    .out_valid(bc_valid), .out_ready(bc_ready), .out_data(bc_data));

  // ---------------- channel-level accelerators ----------------
  logic [NACC-1:0]          r_valid, r_ready;
  word_t [NACC-1:0][LN-1:0] r_data;
  logic [NACC:0]            acc_busy;

  for (genvar a = 0; a < NACC; a++) begin : g_acc
    logic           d_valid, d_ready;
    word_t [LN-1:0] d_data;

    chan_agg #(.LN(LN), .K(K)) u_agg (
      .clk, .rst_n,
      .ch_valid(acc_ch_valid[a*K +: K]), .ch_ready(acc_ch_ready[a*K +: K]),
      .ch_data(ch_data[a*K +: K]),
      .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data),
      .stall_cnt(agg_stall_cnt[a]));

    he_acc #(.LN(LN), .NB(NB), .NNTT(NNTT), .NBC(NBC), .MAXLG(MAXLG),
             .SROWS(SROWS_CH), .KROWS(KROWS)) u_acc (
      .clk, .rst_n, .logn,
      .prog_we(md_prog_we && md_sel == SW'(a)), .prog_addr(md_addr), .prog_data(md_prog),
      .cst_we(md_cst_we && md_sel == SW'(a)), .cst_addr(md_addr), .cst_data(md_cst),
      .seed_we(md_seed_we && md_sel == SW'(a)), .seed(md_seed),
      .start(start && mode), .busy(acc_busy[a]), .done(acc_done[a]),
      .din_valid(d_valid), .din_ready(d_ready), .din_data(d_data), .din_src(4'd0),
      .bin_valid(bc_valid[a]), .bin_ready(bc_ready[a]), .bin_data(bc_data),
      .dout_valid(r_valid[a]), .dout_ready(r_ready[a]), .dout_data(r_data[a]));
  end

  // ---------------- SSD-level accelerator ----------------
  ssd_acc #(.LN(LN), .NB(NB), .NNTT(NNTT), .NBC(NBC), .MAXLG(MAXLG), .NIN(NACC),
            .SROWS(SROWS_SSD), .KROWS(KROWS)) u_ssd (
    .clk, .rst_n, .logn,
    .prog_we(md_prog_we && md_sel == SSD_SEL), .prog_addr(md_addr), .prog_data(md_prog),
    .cst_we(md_cst_we && md_sel == SSD_SEL), .cst_addr(md_addr), .cst_data(md_cst),
    .seed_we(md_seed_we && md_sel == SSD_SEL), .seed(md_seed),
    .start(start && mode), .busy(acc_busy[NACC]), .done(acc_done[NACC]),
    .g_valid(r_valid), .g_ready(r_ready), .g_data(r_data),
    .bin_valid(bc_valid[NACC]), .bin_ready(bc_ready[NACC]), .bin_data(bc_data),
    .dout_valid(res_valid), .dout_ready(res_ready), .dout_data(res_data),
    .contention_cnt(noc_contention_cnt));

  assign done_all = &acc_done;

  a_mode_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (acc_busy != '0) |-> mode);
endmodule
