// zfpv2_decoder: decodes the ZFP-V2 blocks of one chunk after another.
//
// Compressed 256-bit words enter a 1024-bit bit buffer. For each block the
// decoder reads the non-zero flag and emax, derives the number of coded
// planes np, and in one cycle parses the whole level-1 header (np bits, in
// parallel), counts its ones to find the level-2 header, and turns both into
// the data length of every plane. The prefix sums of those lengths locate
// every plane's data bits, so the following cycles extract 8 planes (up to
// 128 bits) per cycle without waiting on one another. The decoded planes
// are transposed back into 16 coefficients.
//
// An end-of-chunk marker (flag 1, emax all ones) ends a chunk: the rest of
// the chunk is dropped and an output beat with eoc=1 and no block is sent,
// which tells the collector to move to the next decoder. Words of the
// chunk that arrive after its marker are discarded.
//
// Timing: header cycle, ceil(np/8) data cycles, one output cycle per block.
// Interface: valid/ready words (in_chunk_last on each chunk's final word),
// valid/ready blocks out.
module zfpv2_decoder
  import zfp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] minexp,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [255:0]       in_data,
  input  logic               in_chunk_last,
  output logic               out_valid,
  input  logic               out_ready,
  output zblk_t              out_blk,
  output logic               out_eoc          // end of chunk, no block
);
  localparam int unsigned BUF_W = 1024;
  localparam int unsigned HDR_MAX = 12 + 64 + 128;

  typedef enum logic [1:0] {S_HDR, S_DATA, S_OUT} state_t;
  state_t            state;
  logic [BUF_W-1:0]  buf_q;
  logic [10:0]       cnt_q;        // valid bits in buf_q
  logic              tail_q;       // whole chunk is in the buffer
  logic              skip_q;       // dropping the rest of a closed chunk
  logic [6:0]        np_q;
  logic [3:0]        grp_q;
  logic [63:0][4:0]  dlen_q;
  logic [63:0][15:0] plane_q;
  logic              zero_q, eoc_q;
  logic [EMAX_W-1:0] emax_q;

  // Header parse of the block at the head of the buffer.
  logic              h_flag;
  logic [EMAX_W-1:0] h_emax;
  logic [6:0]        h_np;
  logic [63:0][4:0]  h_dlen;
  logic [8:0]        h_len;
  logic              hdr_ok;

  always_comb begin
    int pos;
    h_flag = buf_q[0];
    h_emax = buf_q[11:1];
    h_np   = nplanes(h_emax, minexp);
    pos = 12 + int'(h_np);
    for (int j = 0; j < 64; j++) begin
      logic l1b;
      logic [1:0] c;
      l1b = (j < int'(h_np)) && buf_q[12 + j];
      c   = '0;
      if (l1b) begin
        c = {buf_q[pos], buf_q[pos+1]};
        pos += 2;
      end
      h_dlen[j] = (j < int'(h_np)) ? plane_dlen(l1b, c) : 5'd0;
    end
    h_len  = 9'(pos);
    hdr_ok = tail_q || (cnt_q >= 11'(HDR_MAX));
  end

  // Data group extraction.
  logic [63:0][15:0] g_planes;
  logic [7:0]        g_len;
  logic [3:0]        ngrp;
  always_comb begin
    int pos;
    pos = 0;
    g_planes = plane_q;
    for (int k = 0; k < 8; k++) begin
      logic [4:0]  dl;
      logic [15:0] pv;
      dl = dlen_q[8*grp_q + 4'(k)];
      pv = '0;
      for (int b = 0; b < 16; b++)
        if (b < int'(dl)) pv[b] = buf_q[pos + b];
      g_planes[8*grp_q + 4'(k)] = pv;
      pos += int'(dl);
    end
    g_len = 8'(pos);
    ngrp  = 4'((np_q + 7'd7) >> 3);
  end

  logic         consume_v;
  logic [10:0]  consume_n;
  logic         drop;
  logic         accept;

  assign accept   = in_valid && !drop &&
                    (skip_q || (!tail_q && (cnt_q <= 11'(BUF_W - 256))));
  assign in_ready = accept;

  always_comb begin
    consume_v = 1'b0;
    consume_n = '0;
    drop      = 1'b0;
    if (state == S_HDR && hdr_ok && !(cnt_q == 0)) begin
      consume_v = 1'b1;
      if (!h_flag)                 consume_n = 11'd1;
      else if (h_emax == '1)       drop = 1'b1;
      else                         consume_n = 11'(h_len);
    end else if (state == S_DATA && (tail_q || cnt_q >= 11'(g_len))) begin
      consume_v = 1'b1;
      consume_n = 11'(g_len);
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_eoc   = eoc_q;
  always_comb begin
    out_blk.zero = zero_q;
    out_blk.emax = emax_q;
    for (int i = 0; i < NVAL; i++)
      for (int j = 0; j < 64; j++)
        out_blk.v[i][63-j] = plane_q[j][i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_HDR;
      buf_q   <= '0;
      cnt_q   <= '0;
      tail_q  <= 1'b0;
      skip_q  <= 1'b0;
      np_q    <= '0;
      grp_q   <= '0;
      dlen_q  <= '0;
      plane_q <= '0;
      zero_q  <= 1'b0;
      eoc_q   <= 1'b0;
      emax_q  <= '0;
    end else begin
      logic [BUF_W-1:0] b;
      logic [10:0]      c;
      b = buf_q;
      c = cnt_q;
      if (drop) begin
        b = '0;
        c = '0;
      end else if (consume_v) begin
        b = b >> consume_n;
        c = c - consume_n;
      end
      if (accept && skip_q) begin
        if (in_chunk_last) skip_q <= 1'b0;
      end else if (accept) begin
        b = b | (BUF_W'(in_data) << c);
        c = c + 11'd256;
        if (in_chunk_last) tail_q <= 1'b1;
      end
      buf_q <= b;
      cnt_q <= c;
      case (state)
        S_HDR: if (consume_v) begin
          eoc_q   <= drop;
          zero_q  <= !h_flag;
          emax_q  <= h_flag ? h_emax : '0;
          np_q    <= (h_flag && !drop) ? h_np : 7'd0;
          dlen_q  <= h_dlen;
          grp_q   <= '0;
          plane_q <= '0;
          if (drop) begin
            tail_q <= 1'b0;
            skip_q <= !tail_q;
          end
          state   <= (h_flag && !drop && h_np != 0) ? S_DATA : S_OUT;
        end
        S_DATA: if (consume_v) begin
          plane_q <= g_planes;
          grp_q   <= grp_q + 4'd1;
          if (grp_q == ngrp - 4'd1) state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
