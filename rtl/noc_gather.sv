// noc_gather: result path of the on-chip network to the SSD-level accelerator.
//
// NIN row streams (the outputs of the channel-level accelerators) share
// one link to the SSD-level accelerator.  A round-robin arbiter grants one
// requesting input per cycle, starting the search after the input granted
// last, so every accelerator gets a fair share; the granted row and its
// source index go out on a registered valid/ready output (one cycle
// latency, full throughput).  The document shows an on-chip network
// joining the accelerators, the SSD-level accelerator and the rest of the
// controller; this result path and its arbitration are this design's.
//
// Lint note: the round-robin loop index is a 32-bit int of which only
// the low bits are used to index the inputs.
module noc_gather
  import fhe_pkg::*;
#(
  parameter int unsigned LN  = LANES,
  parameter int unsigned NIN = 4,
  parameter int unsigned IW  = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NIN-1:0]            in_valid,
  output logic [NIN-1:0]            in_ready,
  input  word_t [NIN-1:0][LN-1:0]   in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output word_t [LN-1:0]            out_data,
  output logic [IW-1:0]             out_src
);
  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          found;
  logic          can_load;

  assign can_load = !out_valid || out_ready;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 1; i <= NIN; i++) begin
      int c;
      c = (int'(last) + i) % NIN;
      if (!found && in_valid[c]) begin found = 1'b1; pick = IW'(c); end
    end
    in_ready = '0;
    if (found && can_load) in_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(NIN - 1); out_valid <= 1'b0; out_src <= '0; out_data <= '0;
    end else if (can_load) begin
      out_valid <= found;
      if (found) begin
        out_data <= in_data[pick];
        out_src  <= pick;
        last     <= pick;
      end
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready));
endmodule
