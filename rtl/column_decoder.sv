// column_decoder: decompressor for one column of the sparse dataset.
//
// A fixed chain of three pipelined decoders, Pipelined Group Varint, then
// run-length, then delta, undoes the column's encoding (delta, then
// run-length, then Group Varint at compression time). The run-length and
// delta stages can each be bypassed at run time (use_rle, use_delta) to
// match the column's data distribution; HAS_RLE = 0 removes the run-length
// stage from the hardware for columns that never use it.
//
// Interface: start/num_values begin a stream (num_values counts the values
// the Group Varint stream holds, i.e. 2x the pairs when run-length is on);
// valid/ready 512-bit compressed words in; valid/ready beats of eight 32-bit
// values out. Wire speed: one beat per cycle.
module column_decoder
  import zipnn_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter bit          HAS_RLE = 1'b1
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            use_rle,
  input  logic            use_delta,
  input  logic            start,
  input  logic [31:0]     num_values,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IN_W-1:0] in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output beat_t           out_beat
);
  logic  gv_valid, gv_ready, rl_valid, rl_ready, dl_valid, dl_ready;
  logic  r_in_ready, d_in_ready;
  beat_t gv_beat, rl_beat, dl_beat;

  pgv_decoder #(.N(N)) u_pgv (
    .clk, .rst_n, .start, .num_values, .in_valid, .in_ready, .in_data,
    .out_valid(gv_valid), .out_ready(gv_ready), .out_beat(gv_beat));

  logic rle_on;
  assign rle_on = HAS_RLE && use_rle;

  if (HAS_RLE) begin : g_rle
    logic  r_valid;
    beat_t r_beat;
    rle_decoder u_rle (
      .clk, .rst_n,
      .in_valid (gv_valid && rle_on), .in_ready(r_in_ready), .in_beat(gv_beat),
      .out_valid(r_valid), .out_ready(rl_ready && rle_on), .out_beat(r_beat));
    assign rl_valid = rle_on ? r_valid : gv_valid;
    assign rl_beat  = rle_on ? r_beat  : gv_beat;
  end else begin : g_no_rle
    assign r_in_ready = 1'b0;
    assign rl_valid   = gv_valid;
    assign rl_beat    = gv_beat;
  end
  assign gv_ready = rle_on ? r_in_ready : rl_ready;

  logic  d_valid;
  beat_t d_beat;
  delta_decoder u_delta (
    .clk, .rst_n,
    .in_valid (rl_valid && use_delta), .in_ready(d_in_ready), .in_beat(rl_beat),
    .out_valid(d_valid), .out_ready(dl_ready && use_delta), .out_beat(d_beat));
  assign rl_ready  = use_delta ? d_in_ready : dl_ready;
  assign dl_valid  = use_delta ? d_valid : rl_valid;
  assign dl_beat   = use_delta ? d_beat  : rl_beat;

  assign out_valid = dl_valid;
  assign out_beat  = dl_beat;
  assign dl_ready  = out_ready;
endmodule
