// zfpv2_encoder: ZFP-V2 embedded coder with a two-layer variable-length
// header.
//
// Bit plane k of a block is the 16-bit word whose bit i is bit k of
// coefficient i (sequency order). Planes 63 down to 64-np are coded, np
// following from the block exponent and the accuracy setting minexp. Each
// plane gets a variable-length header: "0" when its most significant set
// bit is at index 0 (or it is zero), otherwise "1" plus a two-bit code for
// an MSB of 1, 2-3, 4-7 or 8-15, followed by 1, 2, 4, 8 or 16 low data bits.
// The first header bits of all planes form the level-1 header, the two-bit
// codes the level-2 header, so a decoder can size every plane at once.
//
// Block layout (first bit first): 1-bit non-zero flag (a zero block is the
// single bit 0), 11-bit emax, level-1 header (np bits), level-2 header (2
// bits per plane with level-1 bit 1), then the data bits of each plane.
//
// Timing: a block is registered in one cycle and leaves in up to three
// fragments of at most 512 bits, one per cycle: the header with the data of
// planes 0-15 (it also carries the whole block length, so the packer can
// keep blocks inside a chunk), then planes 16-47, then planes 48-63. A block
// with np <= 16 takes one cycle, np <= 48 two, otherwise three; the next
// block is loaded in the cycle the last fragment leaves.
// Interface: valid/ready on both sides.
module zfpv2_encoder
  import zfp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] minexp,     // floor(log2(error tolerance))
  input  logic               in_valid,
  output logic               in_ready,
  input  zblk_t              in_blk,
  output logic               out_valid,
  input  logic               out_ready,
  output frag_t              out_frag
);
  typedef enum logic {S_IDLE, S_BUSY} state_t;
  state_t           state;
  logic [6:0]       np_q;
  logic [1:0]       frag_q;
  logic             zero_q;
  logic [EMAX_W-1:0] emax_q;
  logic [63:0][15:0] plane_q;     // plane_q[j] = bit plane 63-j

  // Per-plane header fields of the registered block.
  logic [63:0]      l1;
  logic [63:0][1:0] code;
  logic [63:0][4:0] dlen;
  logic [255:0]     hdr_bits;
  logic [8:0]       hdr_len;
  logic [11:0]      blk_len;
  logic [FRAG_W-1:0] dat_bits;
  logic [9:0]       dat_len;
  logic [1:0]       nfrag;

  // Header fields and block length.
  always_comb begin
    int pos;
    int total;
    pos = 0;
    total = 0;
    for (int j = 0; j < 64; j++) begin
      l1[j]   = (j < int'(np_q)) && (plane_q[j][15:1] != 0);
      code[j] = plane_code(plane_q[j]);
      dlen[j] = (j < int'(np_q)) ? plane_dlen(l1[j], code[j]) : 5'd0;
    end
    hdr_bits = '0;
    if (zero_q) begin
      hdr_len = 9'd1;
      blk_len = 12'd1;
    end else begin
      hdr_bits[0]    = 1'b1;
      hdr_bits[11:1] = emax_q;
      pos = 12;
      for (int j = 0; j < 64; j++)
        if (j < int'(np_q)) begin
          hdr_bits[pos] = l1[j];
          pos++;
        end
      for (int j = 0; j < 64; j++)
        if (l1[j]) begin
          hdr_bits[pos]   = code[j][1];   // sent in table order
          hdr_bits[pos+1] = code[j][0];
          pos += 2;
        end
      hdr_len = 9'(pos);
      total = pos;
      for (int j = 0; j < 64; j++) total += int'(dlen[j]);
      blk_len = 12'(total);
    end
  end

  // Data bits of the planes carried by the current fragment: planes 0-15
  // ride with the header, then planes 16-47 and 48-63.
  always_comb begin
    int pos, lo, n;
    dat_bits = '0;
    pos = 0;
    lo  = (frag_q == 2'd0) ? 0 : 16 + 32 * (int'(frag_q) - 1);
    n   = (frag_q == 2'd0) ? 16 : 32;
    for (int k = 0; k < 32; k++) begin
      logic [15:0] pv;
      logic [4:0]  dl;
      pv = '0;
      dl = '0;
      if (k < n && lo + k < 64) begin
        pv = plane_q[lo + k];
        dl = dlen[lo + k];
      end
      for (int b = 0; b < 16; b++)
        if (b < int'(dl)) dat_bits[pos+b] = pv[b];
      pos += int'(dl);
    end
    dat_len = 10'(pos);
    nfrag   = (np_q <= 7'd16) ? 2'd1 : (np_q <= 7'd48) ? 2'd2 : 2'd3;
  end

  assign out_valid = (state == S_BUSY);

  always_comb begin
    out_frag         = '0;
    out_frag.first   = (frag_q == 2'd0);
    out_frag.last    = (frag_q == nfrag - 2'd1);
    out_frag.blk_len = blk_len;
    if (frag_q == 2'd0) begin
      out_frag.bits  = FRAG_W'(hdr_bits) | (dat_bits << hdr_len);
      out_frag.nbits = 10'(hdr_len) + dat_len;
    end else begin
      out_frag.bits  = dat_bits;
      out_frag.nbits = dat_len;
    end
  end

  // A new block is loaded in the cycle its predecessor's last fragment
  // leaves, so a block occupies the encoder for nfrag cycles.
  assign in_ready = (state == S_IDLE) || (out_valid && out_ready && out_frag.last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      np_q    <= '0;
      frag_q  <= '0;
      zero_q  <= 1'b0;
      emax_q  <= '0;
      plane_q <= '0;
    end else begin
      if (out_valid && out_ready) begin
        frag_q <= frag_q + 2'd1;
        if (out_frag.last) state <= S_IDLE;
      end
      if (in_valid && in_ready) begin
        zero_q <= in_blk.zero;
        emax_q <= in_blk.emax;
        np_q   <= in_blk.zero ? 7'd0 : nplanes(in_blk.emax, minexp);
        frag_q <= '0;
        for (int j = 0; j < 64; j++)
          for (int i = 0; i < NVAL; i++)
            plane_q[j][i] <= in_blk.v[i][63-j];
        state <= S_BUSY;
      end
    end
  end
endmodule
