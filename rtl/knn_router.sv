// knn_router: splits the merged tuple stream into documents and hands each
// document to an idle distance engine.
//
// Documents are variable-length runs of tuples with the same document id.
// The router holds one beat of eight tuples and, each cycle, sends the run
// of tuples starting at its current lane that share one document id to that
// document's engine, shifted down to lane 0 as a segment. A segment that
// ends before the end of the beat closes its document. A run that reaches
// the end of the beat closes the document only if the next beat starts with
// a different id (or the stream ends), so the router waits for the next
// beat before sending it. A new document goes to the next idle engine in
// round-robin order; the router stalls while none is idle.
//
// Interface: in_* is a valid/ready stream of tbeat_t (keep is a prefix of
// the lanes; tuples of a document are contiguous and sorted by word);
// eng_valid/eng_ready are one handshake per engine and eng_seg is shared.
// One segment per cycle, so beats holding a single document's tuples pass at
// one per cycle.
//
// Finding document boundaries and dispatching to idle engines follows the
// document; the segment format and round-robin choice are this design's.
module knn_router
  import zipnn_pkg::*;
#(
  parameter int unsigned N_ENG = 4
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  tbeat_t           in_beat,
  output logic [N_ENG-1:0] eng_valid,
  input  logic [N_ENG-1:0] eng_ready,
  output seg_t             eng_seg
);
  localparam int unsigned EA = (N_ENG > 1) ? $clog2(N_ENG) : 1;

  tbeat_t        cur_q;
  logic          cur_v_q;
  logic [3:0]    pos_q;
  logic          open_q;   // a document is open on engine eng_q
  logic [EA-1:0] eng_q;

  logic [31:0]   doc;
  int            end_k;
  logic          more, can_go, beat_done, fire, found;
  logic [EA-1:0] target;

  always_comb begin
    doc = cur_q.t[pos_q[2:0]].doc;
    end_k = LANES;
    for (int k = LANES - 1; k >= 0; k--)
      if (k > int'(pos_q) && (!cur_q.keep[k] || cur_q.t[k].doc != doc)) end_k = k;
    more = (end_k < LANES) && cur_q.keep[end_k];
    beat_done = !more;
    can_go = cur_v_q && (more || cur_q.last || in_valid);

    eng_seg = '0;
    eng_seg.doc  = doc;
    eng_seg.last = more || cur_q.last || (in_valid && in_beat.t[0].doc != doc);
    for (int j = 0; j < LANES; j++) begin
      if (int'(pos_q) + j < end_k) begin
        eng_seg.word[j] = cur_q.t[int'(pos_q) + j].word;
        eng_seg.cnt[j]  = cur_q.t[int'(pos_q) + j].cnt[15:0];
        eng_seg.keep[j] = 1'b1;
      end
    end

    // Engine for this segment: the open one, or the next idle one.
    target = eng_q;
    found = open_q;
    if (!open_q) begin
      for (int i = N_ENG; i >= 1; i--) begin
        if (eng_ready[(int'(eng_q) + i) % N_ENG]) begin
          target = EA'((int'(eng_q) + i) % N_ENG);
          found = 1'b1;
        end
      end
    end
    fire = can_go && found && eng_ready[target];
    eng_valid = '0;
    if (can_go && found) eng_valid[target] = 1'b1;
  end

  assign in_ready = !cur_v_q || (fire && beat_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q   <= '0;
      cur_v_q <= 1'b0;
      pos_q   <= '0;
      open_q  <= 1'b0;
      eng_q   <= '0;
    end else begin
      if (fire) begin
        eng_q  <= target;
        open_q <= !eng_seg.last;
        pos_q  <= beat_done ? 4'd0 : 4'(end_k);
        if (beat_done) cur_v_q <= 1'b0;
      end
      if (in_valid && in_ready) begin
        cur_q   <= in_beat;
        cur_v_q <= 1'b1;
        pos_q   <= '0;
      end
    end
  end
endmodule
