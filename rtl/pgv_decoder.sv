// pgv_decoder: Pipelined Group Varint decoder with header lookahead.
//
// Stream format (byte granular, little endian): a sequence of sections.
// A section is a header chunk of N 16-bit header groups (64 bytes for
// N = 32) followed by its data chunk. Header group g holds eight 2-bit codes;
// code c of value k says the value is stored in c+1 bytes. The data chunk
// holds, for g = 0..N-1, the eight values of group g back to back, so a
// group occupies 8 to 32 bytes. The last section is filled up with zero
// values; the decoder is told how many values the stream holds.
//
// Because every group decodes into one full 256-bit output beat, a data
// chunk takes N output cycles but only N/8..N/2 cycles of 512-bit input.
// The decoder uses that slack: once the next header chunk, which starts
// right after the current data chunk, is inside the 256-byte byte buffer,
// it is captured into a lookahead register. At the last group of a section
// the lookahead header becomes current in the same cycle, so the output
// never pauses between sections.
//
// Interface: start (with num_values) begins a stream; valid/ready 512-bit
// words in; valid/ready beats of eight values out, with keep and last on
// the final beat. One beat per cycle when input keeps up.
module pgv_decoder
  import zipnn_pkg::*;
#(
  parameter int unsigned N = 32            // header groups per section
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    num_values,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [IN_W-1:0] in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output beat_t          out_beat
);
  localparam int unsigned BUFB = 256;      // byte buffer
  localparam int unsigned HB   = N * 2;    // header chunk bytes
  localparam int unsigned GW   = (N > 1) ? $clog2(N) : 1;

  logic [BUFB*8-1:0] buf_q;
  logic [8:0]        cnt_q;                // bytes in buffer
  logic              active_q;             // stream in progress
  logic [31:0]       left_q;               // values still to emit
  logic              have_q;               // current header valid
  logic [HB*8-1:0]   cur_q, nxt_q;
  logic              nxt_v_q;
  logic [GW-1:0]     gidx_q;
  logic [15:0]       rem_q;                // bytes left in current data chunk

  // Size in bytes of a header chunk's data chunk.
  function automatic logic [15:0] chunk_bytes(input logic [HB*8-1:0] h);
    logic [15:0] s;
    s = '0;
    for (int k = 0; k < N * 8; k++) s += 16'(h[2*k +: 2]) + 16'd1;
    return s;
  endfunction

  // Current group.
  logic [15:0] grp;
  logic [5:0]  gs;
  logic [7:0][31:0] vals;
  always_comb begin
    int off;
    grp = cur_q[16*gidx_q +: 16];
    off = 0;
    for (int k = 0; k < 8; k++) begin
      int nb;
      nb = int'(grp[2*k +: 2]) + 1;
      vals[k] = '0;
      for (int b = 0; b < 4; b++)
        if (b < nb) vals[k][8*b +: 8] = buf_q[8*(off + b) +: 8];
      off += nb;
    end
    gs = 6'(off);
  end

  logic last_grp, emit, load_hdr, swap, look;
  assign last_grp = (gidx_q == GW'(N - 1));
  assign out_valid = active_q && have_q && (cnt_q >= 9'(gs));
  assign emit      = out_valid && out_ready;
  assign swap      = emit && last_grp && nxt_v_q && (left_q > 32'd8);
  assign load_hdr  = active_q && !have_q && (cnt_q >= 9'(HB)) && (left_q != 0);
  // Lookahead: the next header chunk starts rem_q bytes into the buffer.
  assign look      = active_q && have_q && !nxt_v_q &&
                     (32'(rem_q) + HB <= 32'(cnt_q)) && (32'(rem_q) + HB <= BUFB);

  always_comb begin
    out_beat.v    = vals;
    out_beat.last = (left_q <= 32'd8);
    for (int k = 0; k < 8; k++) out_beat.keep[k] = (32'(k) < left_q);
  end

  assign in_ready = active_q && (cnt_q <= 9'(BUFB - IN_W / 8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; cnt_q <= '0; active_q <= 1'b0; left_q <= '0;
      have_q <= 1'b0; cur_q <= '0; nxt_q <= '0; nxt_v_q <= 1'b0;
      gidx_q <= '0; rem_q <= '0;
    end else if (start) begin
      buf_q <= '0; cnt_q <= '0; active_q <= (num_values != 0);
      left_q <= num_values; have_q <= 1'b0; nxt_v_q <= 1'b0; gidx_q <= '0;
    end else begin
      logic [BUFB*8-1:0] b;
      logic [8:0]        c;
      logic [8:0]        used;
      b = buf_q;
      c = cnt_q;
      used = '0;
      if (look) begin
        nxt_q   <= (HB*8)'(buf_q >> (8 * rem_q));
        nxt_v_q <= 1'b1;
      end
      if (load_hdr) begin
        cur_q  <= b[HB*8-1:0];
        rem_q  <= chunk_bytes(b[HB*8-1:0]);
        have_q <= 1'b1;
        gidx_q <= '0;
        used   = 9'(HB);
      end
      if (emit) begin
        used   = 9'(gs);
        left_q <= (left_q > 32'd8) ? left_q - 32'd8 : 32'd0;
        gidx_q <= last_grp ? '0 : gidx_q + 1'b1;
        rem_q  <= rem_q - 16'(gs);
        if (left_q <= 32'd8) begin
          active_q <= 1'b0;
          have_q   <= 1'b0;
        end else if (last_grp) begin
          if (swap) begin
            cur_q   <= nxt_q;
            rem_q   <= chunk_bytes(nxt_q);
            nxt_v_q <= 1'b0;
            used    = 9'(gs) + 9'(HB);
          end else begin
            have_q <= 1'b0;
          end
        end
      end
      b = b >> (8 * used);
      c = c - used;
      if (in_valid && in_ready) begin
        b = b | ((BUFB*8)'(in_data) << (8 * c));
        c = c + 9'(IN_W / 8);
      end
      buf_q <= b;
      cnt_q <= c;
    end
  end
endmodule
