// zfpv2_decompressor: one ZFP-V2 decompression pipeline.
//
// The compressed stream arrives as aligned, independent chunks. Whole
// chunks are sent round-robin to an array of N_DEC decoders, each behind an
// input buffer that holds one chunk, so every decoder works at its own pace
// without head-of-line blocking, and in front of an output buffer four
// times the chunk size (enough for the blocks a chunk can hold at the
// compression ratios of interest). Because the number of blocks in a chunk is
// not known in advance, each decoder ends its chunk with an end-of-chunk
// beat; the collector takes blocks from one decoder until it sees that beat
// and then moves to the next, keeping the blocks in stream order. The
// inverse transform and inverse conversion run at one block per cycle, and
// a serialiser emits each 4x4 block as four 256-bit rows.
//
// Interface: valid/ready compressed words in (in_chunk_last on each chunk's
// final word), valid/ready rows of four doubles out; out_blk_last marks the
// fourth row of a block.
module zfpv2_decompressor
  import zfp_pkg::*;
#(
  parameter int unsigned N_DEC       = 4,
  parameter int unsigned CHUNK_BYTES = 6144
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] minexp,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [255:0]       in_data,
  input  logic               in_chunk_last,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [255:0]       out_data,
  output logic               out_blk_last
);
  localparam int unsigned PW = (N_DEC > 1) ? $clog2(N_DEC) : 1;
  localparam int unsigned CHUNK_WORDS = CHUNK_BYTES / 32;
  localparam int unsigned OUT_BLKS    = CHUNK_BYTES * 4 / 128;

  logic [PW-1:0]    dptr_q, cptr_q;
  logic [N_DEC-1:0] fin_ready, fout_valid, fout_ready;
  logic [N_DEC-1:0] dec_valid, dec_ready, dec_eoc;
  logic [N_DEC-1:0] ob_valid, ob_ready, ob_eoc;
  logic [256:0]     fout_data [N_DEC];
  zblk_t            dec_blk  [N_DEC];
  zblk_t            ob_blk   [N_DEC];
  logic             ix_in_ready;

  assign in_ready = fin_ready[dptr_q];

  for (genvar d = 0; d < N_DEC; d++) begin : g_dec
    sync_fifo #(.W(257), .DEPTH(CHUNK_WORDS)) u_chunk_buf (
      .clk, .rst_n,
      .in_valid (in_valid && dptr_q == PW'(d)), .in_ready(fin_ready[d]),
      .in_data  ({in_chunk_last, in_data}),
      .out_valid(fout_valid[d]), .out_ready(fout_ready[d]),
      .out_data (fout_data[d]), .count());
    zfpv2_decoder u_dec (
      .clk, .rst_n, .minexp,
      .in_valid (fout_valid[d]), .in_ready(fout_ready[d]),
      .in_data  (fout_data[d][255:0]), .in_chunk_last(fout_data[d][256]),
      .out_valid(dec_valid[d]), .out_ready(dec_ready[d]),
      .out_blk  (dec_blk[d]), .out_eoc(dec_eoc[d]));
    // Decoded-block buffer: room for the blocks of one chunk (4x the chunk
    // in bytes), so a decoder can run ahead of the collector.
    sync_fifo #(.W(1 + $bits(zblk_t)), .DEPTH(OUT_BLKS)) u_out_buf (
      .clk, .rst_n,
      .in_valid (dec_valid[d]), .in_ready(dec_ready[d]),
      .in_data  ({dec_eoc[d], dec_blk[d]}),
      .out_valid(ob_valid[d]), .out_ready(ob_ready[d]),
      .out_data ({ob_eoc[d], ob_blk[d]}), .count());
    // End-of-chunk beats are always taken; blocks when the transform can.
    assign ob_ready[d] = (cptr_q == PW'(d)) && (ob_eoc[d] || ix_in_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr_q <= '0;
      cptr_q <= '0;
    end else begin
      if (in_valid && in_ready && in_chunk_last)
        dptr_q <= (dptr_q == PW'(N_DEC - 1)) ? '0 : dptr_q + 1'b1;
      if (ob_valid[cptr_q] && ob_eoc[cptr_q])
        cptr_q <= (cptr_q == PW'(N_DEC - 1)) ? '0 : cptr_q + 1'b1;
    end
  end

  logic  ix_valid, ic_in_ready, ic_valid, ser_ready;
  zblk_t ix_blk;
  blk_t  ic_data;

  zfp_inv_xform u_ix (
    .clk, .rst_n,
    .in_valid (ob_valid[cptr_q] && !ob_eoc[cptr_q]), .in_ready(ix_in_ready),
    .in_blk   (ob_blk[cptr_q]),
    .out_valid(ix_valid), .out_ready(ic_in_ready), .out_blk(ix_blk));

  zfp_inv_cast u_ic (
    .clk, .rst_n,
    .in_valid (ix_valid), .in_ready(ic_in_ready), .in_blk(ix_blk),
    .out_valid(ic_valid), .out_ready(ser_ready), .out_data(ic_data));

  // Row serialiser.
  logic [1:0] row_q;
  assign out_valid    = ic_valid;
  assign out_data     = ic_data[4*row_q +: 4];
  assign out_blk_last = (row_q == 2'd3);
  assign ser_ready    = out_ready && (row_q == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_q <= '0;
    else if (out_valid && out_ready) row_q <= row_q + 2'd1;
  end
endmodule
