// chan_agg: concatenates K flash channels into one HE accelerator input.
//
// Each NAND channel delivers a byte stream (8-bit channel bus).  Channel k
// fills slice k of the output row, words [k*LN/K, (k+1)*LN/K), each word
// made of BPW = ceil(W/8) bytes, least significant byte first (unused top
// bits are dropped).  When every slice is full the row is offered on the
// valid/ready output; a channel whose slice is full is stalled (its ready
// drops) until the row has been taken, which throttles fast channels to
// the slowest one and to the accelerator.  stall_cnt counts channel-cycles
// spent stalled with data waiting, for performance monitoring.
// The document's point is that K channels feed one accelerator so that it
// sees K times the channel bandwidth; the byte layout, slice assignment and
// stall policy are this design's.
//
// Lint note: five bytes (40 bits) carry one 36-bit word; the top four
// bits of the fifth byte are padding and unused.
module chan_agg
  import fhe_pkg::*;
#(
  parameter int unsigned LN = LANES,
  parameter int unsigned K  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [K-1:0]         ch_valid,
  output logic [K-1:0]         ch_ready,
  input  logic [K-1:0][7:0]    ch_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output word_t [LN-1:0]       out_data,
  output logic [31:0]          stall_cnt
);
  localparam int unsigned BPW   = (W + 7) / 8;
  localparam int unsigned SW    = LN / K;           // words per slice
  localparam int unsigned SB    = SW * BPW;         // bytes per slice
  localparam int unsigned CW    = $clog2(SB + 1);

  logic [SB*8-1:0] sbuf [K];
  logic [CW-1:0]   cnt  [K];
  logic [K-1:0]    full;
  logic            take;

  for (genvar k = 0; k < K; k++) begin : g_ch
    assign full[k]     = (cnt[k] == CW'(SB));
    assign ch_ready[k] = !full[k];
    for (genvar w = 0; w < SW; w++) begin : g_w
      logic [BPW*8-1:0] bytes;
      assign bytes = sbuf[k][w*BPW*8 +: BPW*8];
      assign out_data[k*SW + w] = bytes[W-1:0];
    end
  end

  assign out_valid = &full;
  assign take      = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) cnt[k] <= '0;
      stall_cnt <= '0;
    end else begin
      for (int k = 0; k < K; k++) begin
        if (take)                       cnt[k] <= '0;
        else if (ch_valid[k] && !full[k]) cnt[k] <= cnt[k] + 1'b1;
      end
      stall_cnt <= stall_cnt + 32'($countones(ch_valid & full));
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++)
      if (ch_valid[k] && !full[k]) sbuf[k][cnt[k]*8 +: 8] <= ch_data[k];
  end
endmodule
