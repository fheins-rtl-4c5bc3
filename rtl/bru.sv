// bru: broadcast unit (BrU).
//
// Copies one row stream to NOUT consumers, the channel-level HE
// accelerators, so that data every accelerator needs (query ciphertext,
// keys) crosses the controller once.  A row is taken from the input only
// when every consumer whose bit is set in dst_mask is ready, and is then
// presented to all of them in the same cycle (a lock-step join, no
// buffering, zero latency).  Consumers outside dst_mask see no valid.
// The document names the Broadcast Unit beside the shared scratchpad; the
// lock-step join and the mask are this design's choice.
module bru
  import fhe_pkg::*;
#(
  parameter int unsigned LN   = LANES,
  parameter int unsigned NOUT = 4
) (
  input  logic               in_valid,
  output logic               in_ready,
  input  word_t [LN-1:0]     in_data,
  input  logic [NOUT-1:0]    dst_mask,
  output logic [NOUT-1:0]    out_valid,
  input  logic [NOUT-1:0]    out_ready,
  output word_t [LN-1:0]     out_data
);
  logic all_ready;
  assign all_ready = &(out_ready | ~dst_mask);
  assign in_ready  = all_ready && (dst_mask != '0);
  assign out_valid = (in_valid && in_ready) ? dst_mask : '0;
  assign out_data  = in_data;
endmodule
