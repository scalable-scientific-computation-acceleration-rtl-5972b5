// zfpv2_compressor: one ZFP-V2 compression pipeline.
//
// Four 256-bit words (one row of four doubles each, rows y = 0..3) make one
// 4x4 block. The block passes the block-floating-point conversion and the
// decorrelating transform, which run at one block per cycle, and is then
// handed round-robin to an array of N_ENC encoders. Since every block has
// the same uncompressed size, the distributor never waits for an encoder to
// finish; the collector reads the encoders' fragments back in the same
// round-robin order, so blocks stay in order, and the bit packer builds
// aligned, independent chunks. With a block arriving every 4 cycles and an
// encoder taking at most 9 cycles per block, three encoders keep up with the
// input; four are instantiated by default.
//
// Interface: valid/ready words in; flush closes the last chunk once all
// accepted blocks are packed; valid/ready
// compressed words out with a chunk-last flag.
module zfpv2_compressor
  import zfp_pkg::*;
#(
  parameter int unsigned N_ENC       = 4,
  parameter int unsigned CHUNK_BYTES = 6144
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] minexp,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [255:0]       in_data,
  input  logic               flush,
  output logic               flush_done,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [255:0]       out_data,
  output logic               out_chunk_last
);
  localparam int unsigned PW = (N_ENC > 1) ? $clog2(N_ENC) : 1;

  // Row deserialiser.
  blk_t       rows_q;
  logic [1:0] row_q;
  logic       blk_valid_q;
  logic       cast_in_ready;

  assign in_ready = !blk_valid_q || cast_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_q      <= '0;
      row_q       <= '0;
      blk_valid_q <= 1'b0;
    end else begin
      if (blk_valid_q && cast_in_ready) blk_valid_q <= 1'b0;
      if (in_valid && in_ready) begin
        rows_q[4*row_q +: 4] <= in_data;
        row_q <= row_q + 2'd1;
        if (row_q == 2'd3) blk_valid_q <= 1'b1;
      end
    end
  end

  logic  cast_valid, xf_in_ready, xf_valid, xf_ready;
  zblk_t cast_blk, xf_blk;

  zfp_fwd_cast u_cast (
    .clk, .rst_n,
    .in_valid (blk_valid_q), .in_ready (cast_in_ready), .in_data (rows_q),
    .out_valid(cast_valid),  .out_ready(xf_in_ready),   .out_blk (cast_blk));

  zfp_fwd_xform u_xf (
    .clk, .rst_n,
    .in_valid (cast_valid), .in_ready (xf_in_ready), .in_blk (cast_blk),
    .out_valid(xf_valid),   .out_ready(xf_ready),    .out_blk(xf_blk));

  // Round-robin encoder array.
  logic [PW-1:0] dptr_q, cptr_q;
  logic [N_ENC-1:0] enc_in_ready, enc_out_valid, enc_out_ready;
  frag_t            enc_frag [N_ENC];
  logic             pk_in_ready;

  assign xf_ready = enc_in_ready[dptr_q];

  for (genvar e = 0; e < N_ENC; e++) begin : g_enc
    zfpv2_encoder u_enc (
      .clk, .rst_n, .minexp,
      .in_valid (xf_valid && dptr_q == PW'(e)), .in_ready(enc_in_ready[e]),
      .in_blk   (xf_blk),
      .out_valid(enc_out_valid[e]), .out_ready(enc_out_ready[e]),
      .out_frag (enc_frag[e]));
    assign enc_out_ready[e] = pk_in_ready && (cptr_q == PW'(e));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dptr_q <= '0;
      cptr_q <= '0;
    end else begin
      if (xf_valid && xf_ready)
        dptr_q <= (dptr_q == PW'(N_ENC - 1)) ? '0 : dptr_q + 1'b1;
      if (enc_out_valid[cptr_q] && pk_in_ready && enc_frag[cptr_q].last)
        cptr_q <= (cptr_q == PW'(N_ENC - 1)) ? '0 : cptr_q + 1'b1;
    end
  end

  // A flush is held until every block already accepted has reached the
  // packer, so the last blocks are never pushed into a chunk of their own.
  logic       flush_pend_q, pk_flush;
  logic [7:0] infl_q;
  wire        blk_in  = blk_valid_q && cast_in_ready;
  wire        blk_out = enc_out_valid[cptr_q] && pk_in_ready && enc_frag[cptr_q].last;

  assign pk_flush = flush_pend_q && infl_q == 8'd0 && row_q == 2'd0 && !blk_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush_pend_q <= 1'b0;
      infl_q       <= '0;
    end else begin
      infl_q <= infl_q + {7'd0, blk_in} - {7'd0, blk_out};
      if (flush) flush_pend_q <= 1'b1;
      else if (pk_flush) flush_pend_q <= 1'b0;
    end
  end

  zfp_bit_packer #(.CHUNK_BYTES(CHUNK_BYTES)) u_pack (
    .clk, .rst_n,
    .in_valid (enc_out_valid[cptr_q]), .in_ready(pk_in_ready),
    .in_frag  (enc_frag[cptr_q]),
    .flush(pk_flush), .flush_done,
    .out_valid, .out_ready, .out_data, .out_chunk_last);
endmodule
