// zipnn_top: k-nearest-neighbour search over a compressed sparse dataset.
//
// The dataset is three columns (document id, word id, count), each
// compressed on its own and streamed into its own column decoder: column 1
// is built with the run-length stage (document ids come in long runs),
// columns 2 and 3 without it. The decoders' output beats are merged lane by
// lane into beats of eight <doc, word, count> tuples (a beat is taken when
// all three have one), which the router cuts into documents and hands to
// N_ENG cosine engines. Finished scores go, in round-robin order, through
// the top-k sorter's FIFO into its sorted K-entry buffer.
//
// Interface: per-column configuration (use_rle, use_delta), value count and
// 512-bit compressed input stream; a QVM write port broadcast to the engines
// selected by qvm_sel (each engine may hold a different query); clear
// restarts the top-k buffer; rd_idx/rd_res/rd_valid read the ranked result;
// done goes high once the last tuple has been scored and sorted.
//
// The structure (per-column decoders, merge, router, parallel engines, top-k
// sorter) follows the document; the merge rule, the number of engines and
// the completion signal are this design's own.
module zipnn_top
  import zipnn_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned N_ENG      = 4,
  parameter int unsigned QVM_DEPTH  = 1024,
  parameter int unsigned K          = TOPK_K,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned QA = $clog2(QVM_DEPTH)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           use_rle,
  input  logic [2:0]           use_delta,
  input  logic                 start,
  input  logic [2:0][31:0]     num_values,
  input  logic [2:0]           in_valid,
  output logic [2:0]           in_ready,
  input  logic [2:0][IN_W-1:0] in_data,
  input  logic [N_ENG-1:0]     qvm_sel,
  input  logic                 qvm_we,
  input  logic [QA-1:0]        qvm_addr,
  input  qent_t                qvm_data,
  input  logic [QA:0]          qvm_len,
  input  logic                 clear,
  input  logic [$clog2(K)-1:0] rd_idx,
  output scored_t              rd_res,
  output logic                 rd_valid,
  output logic                 done,
  output logic [31:0]          n_insert,
  output logic [31:0]          n_drop
);
  logic [2:0] c_valid, c_ready;
  beat_t      c_beat [3];

  for (genvar c = 0; c < 3; c++) begin : g_col
    column_decoder #(.N(N), .HAS_RLE(c == 0)) u_col (
      .clk, .rst_n, .use_rle(use_rle[c]), .use_delta(use_delta[c]), .start,
      .num_values(num_values[c]), .in_valid(in_valid[c]), .in_ready(in_ready[c]),
      .in_data(in_data[c]), .out_valid(c_valid[c]), .out_ready(c_ready[c]),
      .out_beat(c_beat[c]));
  end

  // Merge the three columns into tuple beats.
  logic   m_valid, m_ready;
  tbeat_t m_beat;
  always_comb begin
    m_valid = &c_valid;
    m_beat.keep = c_beat[0].keep & c_beat[1].keep & c_beat[2].keep;
    m_beat.last = c_beat[0].last;
    for (int k = 0; k < LANES; k++)
      m_beat.t[k] = '{doc: c_beat[0].v[k], word: c_beat[1].v[k], cnt: c_beat[2].v[k]};
  end
  assign c_ready = {3{m_valid && m_ready}};

  logic [N_ENG-1:0] e_in_valid, e_in_ready, e_out_valid, e_out_ready;
  seg_t             seg;
  scored_t          e_res [N_ENG];

  knn_router #(.N_ENG(N_ENG)) u_router (
    .clk, .rst_n, .in_valid(m_valid), .in_ready(m_ready), .in_beat(m_beat),
    .eng_valid(e_in_valid), .eng_ready(e_in_ready), .eng_seg(seg));

  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    cosine_engine #(.QVM_DEPTH(QVM_DEPTH)) u_eng (
      .clk, .rst_n, .qvm_we(qvm_we && qvm_sel[e]), .qvm_addr, .qvm_data, .qvm_len,
      .in_valid(e_in_valid[e]), .in_ready(e_in_ready[e]), .in_seg(seg),
      .out_valid(e_out_valid[e]), .out_ready(e_out_ready[e]), .out_res(e_res[e]));
  end

  // Round-robin collection of finished scores.
  localparam int unsigned EA = (N_ENG > 1) ? $clog2(N_ENG) : 1;
  logic [EA-1:0] rr_q, pick;
  logic          s_valid, s_ready, any;
  always_comb begin
    pick = rr_q;
    any  = 1'b0;
    for (int i = N_ENG; i >= 1; i--) begin
      if (e_out_valid[(int'(rr_q) + i) % N_ENG]) begin
        pick = EA'((int'(rr_q) + i) % N_ENG);
        any  = 1'b1;
      end
    end
    s_valid = any;
    e_out_ready = '0;
    if (any) e_out_ready[pick] = s_ready;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (s_valid && s_ready) rr_q <= pick;
  end

  logic busy;
  topk_sorter #(.K(K), .FIFO_DEPTH(FIFO_DEPTH)) u_topk (
    .clk, .rst_n, .clear, .in_valid(s_valid), .in_ready(s_ready), .in_res(e_res[pick]),
    .rd_idx, .rd_res, .rd_valid, .busy, .n_insert, .n_drop);

  // Completion: the last merged beat has passed the router and every engine
  // and the sorter are idle again.
  logic seen_last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seen_last_q <= 1'b0;
    else if (start || clear) seen_last_q <= 1'b0;
    else if (m_valid && m_ready && m_beat.last) seen_last_q <= 1'b1;
  end
  logic router_idle;
  assign router_idle = m_ready && !m_valid;
  assign done = seen_last_q && router_idle && (&e_in_ready) && !(|e_out_valid) && !busy;
endmodule
