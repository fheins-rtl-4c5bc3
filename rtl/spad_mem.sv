// spad_mem: on-chip SRAM of an HE accelerator (scratchpad or key buffer).
//
// Organised as SROWS superrows, each NB rows of LN words.  Two synchronous
// read ports return a whole superrow one cycle after the address, so all
// NB MODUs can be fed at once; the write port writes any subset of the NB
// rows of one superrow (w_mask), which lets single-row producers such as
// the NTT and BCONV engines share it.  A write and a read of the same
// superrow in one cycle return the old contents.
// The capacities (7 MB per channel-level accelerator, 13 MB for the
// SSD-level one) are the document's; the organisation and port count are
// this design's choice.
module spad_mem
  import fhe_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned NB    = NUM_MODU,
  parameter int unsigned SROWS = 1592,              // 7 MB of 36-bit words
  parameter int unsigned AW    = $clog2(SROWS)
) (
  input  logic                         clk,
  input  logic [AW-1:0]                ra_addr,
  output word_t [NB-1:0][LN-1:0]       ra_data,
  input  logic [AW-1:0]                rb_addr,
  output word_t [NB-1:0][LN-1:0]       rb_data,
  input  logic                         w_en,
  input  logic [AW-1:0]                w_addr,
  input  logic [NB-1:0]                w_mask,
  input  word_t [NB-1:0][LN-1:0]       w_data
);
  word_t [NB-1:0][LN-1:0] mem [SROWS];

  always_ff @(posedge clk) begin
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
    if (w_en)
      for (int b = 0; b < NB; b++)
        if (w_mask[b]) mem[w_addr][b] <= w_data[b];
  end
endmodule
