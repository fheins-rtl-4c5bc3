// global_buffer: shared on-chip scratchpad of the SSD controller.
//
// Holds the data every channel-level accelerator needs, such as the
// client's query ciphertext and key-switching keys, written row by row by
// the host / DRAM side (wr_en, wr_addr, wr_data).  A stream command
// (st_start with st_base and st_count) then reads st_count consecutive rows
// and presents them on a valid/ready stream; st_busy is high until the
// last row has been taken.  Reads are synchronous and at most one is in
// flight, into a single output register, so a stall of the consumer never
// loses a row; the price is one row every two cycles.  The document shows the Global Buffer and its
// link to the accelerators; its capacity and ports are this design's.
module global_buffer
  import fhe_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned ROWS  = 1024,
  parameter int unsigned AW    = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  word_t [LN-1:0]  wr_data,
  input  logic            st_start,
  input  logic [AW-1:0]   st_base,
  input  logic [AW:0]     st_count,
  output logic            st_busy,
  output logic            out_valid,
  input  logic            out_ready,
  output word_t [LN-1:0]  out_data
);
  word_t [LN-1:0] mem [ROWS];
  logic [AW-1:0]  raddr;
  logic [AW:0]    left;          // rows still to read
  logic           rd_pend;       // read issued last cycle
  word_t [LN-1:0] rdata;
  logic           ov;
  logic           issue;

  // issue a read only when the output register is sure to be free when
  // the data lands: nothing in flight and the current row leaving now
  assign issue = (left != '0) && !rd_pend && (!ov || out_ready);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (issue) rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr <= '0; left <= '0; rd_pend <= 1'b0; ov <= 1'b0; out_data <= '0;
    end else begin
      if (st_start && left == '0 && !rd_pend && !ov) begin
        raddr <= st_base; left <= st_count;
      end else if (issue) begin
        raddr <= raddr + 1'b1; left <= left - 1'b1;
      end
      rd_pend <= issue;
      if (ov && out_ready) ov <= 1'b0;
      if (rd_pend) begin ov <= 1'b1; out_data <= rdata; end
    end
  end

  assign out_valid = ov;
  assign st_busy   = (left != '0) || rd_pend || ov;

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) rd_pend |-> (!ov || out_ready));
endmodule
