// cosine_engine: one distance calculation pipeline of the k-NN engine, with
// its own query vector memory (QVM).
//
// The QVM holds the query as <word, frequency> entries sorted by word and is
// written through qvm_we/qvm_addr/qvm_data (qvm_len entries are used). A
// document arrives as segments of up to eight <word, count> pairs, also
// sorted by word. Each cycle the held segment is compared against the
// current QVM entry, the way a merge sorter compares the heads of two sorted
// lists: lanes whose word equals the entry's word add count * frequency to
// the dot product; the QVM pointer advances when the segment holds a word at
// or past the entry's, and the segment is consumed when none of its words is
// past the entry. So per cycle the engine takes eight document pairs, one
// QVM entry, or both. The squared norm of the document (sum of count^2) is
// accumulated as segments are consumed.
//
// When the last segment of a document is consumed, the score
//   score = min(2^32 - 1, floor(dot^2 * 2^SCORE_FRAC / norm2))
// is computed by a restoring divider, one quotient bit per cycle (32
// cycles). The query norm is the same for every document, so this orders
// documents exactly as cosine similarity does (counts and frequencies are
// non-negative). The score and document id are then offered on out_*.
//
// The compare-and-merge pipeline, the per-engine QVM and the 8-pairs-or-one-
// entry-per-cycle rate follow the document; the squared score, the divider,
// the 16-bit counts and frequencies and the QVM size are this design's own.
// The QVM is read asynchronously (distributed memory).
module cosine_engine
  import zipnn_pkg::*;
#(
  parameter int unsigned QVM_DEPTH = 1024,
  localparam int unsigned QA = $clog2(QVM_DEPTH)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          qvm_we,
  input  logic [QA-1:0] qvm_addr,
  input  qent_t         qvm_data,
  input  logic [QA:0]   qvm_len,
  input  logic          in_valid,
  output logic          in_ready,
  input  seg_t          in_seg,
  output logic          out_valid,
  input  logic          out_ready,
  output scored_t       out_res
);
  typedef enum logic [1:0] {S_MERGE, S_DIV, S_OUT} state_e;
  state_e state_q;

  qent_t qvm [QVM_DEPTH];
  always_ff @(posedge clk) if (qvm_we) qvm[qvm_addr] <= qvm_data;

  seg_t        seg_q;
  logic        seg_v_q;
  logic [QA:0] qptr_q;
  logic [31:0] dot_q;
  logic [47:0] norm_q;
  logic [31:0] doc_q;
  logic [71:0] num_q;
  logic [47:0] rem_q;
  logic [31:0] quo_q;
  logic [5:0]  bit_q;

  // Merge step on the held segment.
  qent_t       qe;
  logic        q_ok, seg_done, q_adv, any_keep;
  logic [31:0] maxw, dot_add;
  logic [47:0] norm_add;
  always_comb begin
    qe = qvm[qptr_q[QA-1:0]];
    q_ok = (qptr_q < qvm_len);
    maxw = '0;
    any_keep = 1'b0;
    dot_add = '0;
    norm_add = '0;
    for (int k = 0; k < LANES; k++) begin
      if (seg_q.keep[k]) begin
        maxw = seg_q.word[k];
        any_keep = 1'b1;
        norm_add += 48'(seg_q.cnt[k] * seg_q.cnt[k]);
        if (q_ok && seg_q.word[k] == qe.word) dot_add += 32'(seg_q.cnt[k] * qe.freq);
      end
    end
    seg_done = !any_keep || !q_ok || (maxw <= qe.word);
    q_adv    = any_keep && q_ok && (maxw >= qe.word);
  end

  logic consume;
  assign consume  = (state_q == S_MERGE) && seg_v_q && seg_done;
  assign in_ready = (state_q == S_MERGE) && (!seg_v_q || (consume && !seg_q.last));

  assign out_valid = (state_q == S_OUT);
  assign out_res   = '{score: quo_q, doc: doc_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_MERGE;
      seg_q   <= '0;
      seg_v_q <= 1'b0;
      qptr_q  <= '0;
      dot_q   <= '0;
      norm_q  <= '0;
      doc_q   <= '0;
      num_q   <= '0;
      rem_q   <= '0;
      quo_q   <= '0;
      bit_q   <= '0;
    end else begin
      case (state_q)
        S_MERGE: begin
          if (seg_v_q) begin
            dot_q <= dot_q + dot_add;
            if (q_adv && !(seg_done && seg_q.last)) qptr_q <= qptr_q + 1'b1;
          end
          if (consume) begin
            norm_q <= norm_q + norm_add;
            if (seg_q.last) begin
              logic [31:0] d;
              d = dot_q + dot_add;
              doc_q   <= seg_q.doc;
              num_q   <= {64'(d) * 64'(d), SCORE_FRAC'(0)};
              qptr_q  <= '0;
              state_q <= S_DIV;
              bit_q   <= 6'd0;
            end
          end
          if (in_valid && in_ready) begin
            seg_q   <= in_seg;
            seg_v_q <= 1'b1;
          end else if (consume) begin
            seg_v_q <= 1'b0;
          end
        end
        S_DIV: begin
          if (bit_q == 6'd0) begin
            // First cycle: the high part of the dividend must be below the
            // divisor for the quotient to fit in 32 bits.
            if (norm_q == '0) begin
              quo_q <= '0; state_q <= S_OUT;
            end else if (49'(num_q[71:32]) >= {1'b0, norm_q}) begin
              quo_q <= '1; state_q <= S_OUT;
            end else begin
              rem_q <= 48'(num_q[71:32]);
              bit_q <= 6'd1;
            end
          end else begin
            logic [48:0] r;
            r = {rem_q, num_q[7'd32 - 7'(bit_q)]};
            if (r >= {1'b0, norm_q}) begin
              rem_q <= 48'(r - {1'b0, norm_q});
              quo_q <= {quo_q[30:0], 1'b1};
            end else begin
              rem_q <= 48'(r);
              quo_q <= {quo_q[30:0], 1'b0};
            end
            if (bit_q == 6'd32) state_q <= S_OUT;
            bit_q <= bit_q + 1'b1;
          end
        end
        default: begin
          if (out_ready) begin
            state_q <= S_MERGE;
            dot_q   <= '0;
            norm_q  <= '0;
          end
        end
      endcase
    end
  end
endmodule
