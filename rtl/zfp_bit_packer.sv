// zfp_bit_packer: the shuffler at the end of the compressor. Packs the
// variable-length fragments of compressed blocks into 256-bit words and
// organises the words into independent, aligned chunks.
//
// Bits are packed LSB first into a 1024-bit accumulator, which takes a
// fragment of up to 512 bits whenever it holds fewer than 512, and leave as
// soon as 256 are present. Before the first fragment of a block is accepted the
// packer checks that the whole block, plus a 12-bit end-of-chunk marker,
// still fits in the current chunk; if not it closes the chunk: it writes the
// marker (non-zero flag + all-ones exponent) and zero fill up to the chunk
// boundary. No block therefore straddles two chunks and every chunk can be
// decoded on its own. A flush request closes the current chunk the same way
// once all fragments have been taken (end of stream).
//
// Interface: valid/ready fragments in, valid/ready words out; out_chunk_last
// marks the final word of each chunk. One fragment and one word per cycle.
module zfp_bit_packer
  import zfp_pkg::*;
#(
  parameter int unsigned CHUNK_BYTES = 6144
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  frag_t          in_frag,
  input  logic           flush,           // close the current chunk
  output logic           flush_done,      // pulses when a flush completes
  output logic           out_valid,
  input  logic           out_ready,
  output logic [255:0]   out_data,
  output logic           out_chunk_last
);
  localparam int unsigned CHUNK_WORDS = CHUNK_BYTES / 32;
  localparam int unsigned CHUNK_BITS  = CHUNK_BYTES * 8;

  logic [1023:0] acc_q;
  logic [10:0]  fill_q;          // valid bits in acc_q
  logic [15:0]  wcnt_q;          // words already sent in this chunk
  logic         pad_q;           // closing the chunk
  logic         pend_flush_q;

  logic         emit, take, start_pad, fits;
  logic [31:0]  pos;

  assign pos       = 32'(wcnt_q) * 256 + 32'(fill_q);
  assign fits      = pos + 32'(in_frag.blk_len) + EOC_BITS <= CHUNK_BITS;
  assign out_data  = acc_q[255:0];
  assign out_valid = pad_q || (fill_q >= 11'd256);
  assign out_chunk_last = (wcnt_q == 16'(CHUNK_WORDS - 1));
  assign emit      = out_valid && out_ready;
  // Fragments are taken only while not closing a chunk and only into a
  // non-full accumulator; the first fragment of a block must fit.
  assign start_pad = !pad_q && ((in_valid && in_frag.first && !fits) ||
                                (pend_flush_q && !in_valid && pos != 0));
  assign take      = in_valid && !pad_q && !start_pad && (fill_q < 11'd512);
  assign in_ready  = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q        <= '0;
      fill_q       <= '0;
      wcnt_q       <= '0;
      pad_q        <= 1'b0;
      pend_flush_q <= 1'b0;
      flush_done   <= 1'b0;
    end else begin
      logic [1023:0] a;
      logic [10:0]   f;
      a = acc_q;
      f = fill_q;
      flush_done <= 1'b0;
      if (flush) pend_flush_q <= 1'b1;
      if (emit) begin
        a = a >> 256;
        f = (f >= 11'd256) ? f - 11'd256 : 11'd0;
        if (out_chunk_last) begin
          wcnt_q <= '0;
          pad_q  <= 1'b0;
          a = '0;
          f = '0;
          if (pad_q && pend_flush_q && !in_valid) begin
            pend_flush_q <= 1'b0;
            flush_done   <= 1'b1;
          end
        end else begin
          wcnt_q <= wcnt_q + 16'd1;
        end
      end
      if (start_pad && !emit) begin
        a = a | (1024'(EOC_MARK) << f);
        f = f + 11'(EOC_BITS);
        pad_q <= 1'b1;
      end
      if (take) begin
        a = a | (1024'(in_frag.bits) << f);
        f = f + 11'(in_frag.nbits);
      end
      if (pend_flush_q && !in_valid && pos == 0 && !pad_q && !emit) begin
        pend_flush_q <= 1'b0;
        flush_done   <= 1'b1;
      end
      acc_q  <= a;
      fill_q <= f;
    end
  end
endmodule
