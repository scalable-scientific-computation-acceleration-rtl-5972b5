// topk_sorter: keeps the K highest-scoring <score, document> pairs seen
// since the last clear, in descending order of score.
//
// Scores first enter a FIFO (FIFO_DEPTH entries) so the distance engines
// keep running while an insertion is in progress. The K entries are held in
// a buffer of K/W rows of W entries (W = 4), each row sorted and the rows in
// descending order. A global minimum register holds the smallest kept score
// once the buffer is full; a new score not above it is dropped in one cycle
// without touching the buffer. Any other score is inserted by one sweep over
// all K/W rows, one row per cycle (32 cycles for K = 128): in each row the
// carried entry is placed at its sorted position, the entries below it move
// down one place, and the row's smallest entry is carried into the next row.
// The entry carried out of the last row is discarded. Equal scores keep
// their arrival order: the arriving score goes after kept equal scores,
// while an evicted entry, older than everything below it, goes before them.
//
// Interface: clear empties the buffer; in_* is a valid/ready stream of
// scored_t; rd_idx selects one of the K ranked results (0 = best), read
// combinationally on rd_res/rd_valid; busy is high while the FIFO is not
// empty or a sweep is running; n_insert/n_drop count the scores that needed
// a sweep and the scores dropped by the global minimum test.
//
// The wide sorted buffer, the row-by-row sweep with eviction to the next
// row, the global minimum filter and the FIFO follow the document. The FIFO
// depth, the full sweep even when the carried entry runs out early, and the
// register-array buffer are this design's own choices.
module topk_sorter
  import zipnn_pkg::*;
#(
  parameter int unsigned K          = TOPK_K,
  parameter int unsigned W          = TOPK_W,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned R  = K / W,
  localparam int unsigned RA = (R > 1) ? $clog2(R) : 1
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  scored_t              in_res,
  input  logic [$clog2(K)-1:0] rd_idx,
  output scored_t              rd_res,
  output logic                 rd_valid,
  output logic                 busy,
  output logic [31:0]          n_insert,
  output logic [31:0]          n_drop
);
  typedef struct packed {
    logic    v;
    scored_t s;
  } ent_t;
  typedef ent_t [W-1:0] row_t;

  row_t rows [R];

  logic    f_valid, f_ready;
  scored_t f_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  sync_fifo #(.W($bits(scored_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_res),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(f_count));

  logic        sweep_q;
  logic [RA-1:0] row_q;
  ent_t        carry_q;
  logic        carry_new_q;  // carry is the arriving score, not an evicted one
  logic        full_q;
  logic [31:0] gmin_q;

  assign f_ready = !sweep_q && !clear;
  assign busy    = f_valid || sweep_q;

  // Insert the carried entry into the current row.
  row_t cur, nxt;
  ent_t evict;
  logic placed;
  always_comb begin
    int p;
    cur = rows[row_q];
    p = W;
    for (int j = W - 1; j >= 0; j--)
      if (!cur[j].v || carry_q.s.score > cur[j].s.score ||
          (!carry_new_q && carry_q.s.score == cur[j].s.score)) p = j;
    nxt = cur;
    evict = carry_q;
    placed = carry_q.v && p < W;
    if (placed) begin
      evict = cur[W-1];
      for (int j = 0; j < W; j++) begin
        if (j == p) nxt[j] = carry_q;
        else if (j > p) nxt[j] = cur[j-1];
      end
    end
  end

  // Result read port.
  ent_t rd_e;
  always_comb begin
    row_t r;
    r = rows[int'(rd_idx) / W];
    rd_e = r[int'(rd_idx) % W];
  end
  assign rd_res   = rd_e.s;
  assign rd_valid = rd_e.v;

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int i = 0; i < R; i++) rows[i] <= '0;
    end else if (sweep_q) begin
      rows[row_q] <= nxt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_q  <= 1'b0;
      row_q    <= '0;
      carry_q  <= '0;
      carry_new_q <= 1'b0;
      full_q   <= 1'b0;
      gmin_q   <= '0;
      n_insert <= '0;
      n_drop   <= '0;
    end else if (clear) begin
      sweep_q  <= 1'b0;
      full_q   <= 1'b0;
      gmin_q   <= '0;
      n_insert <= '0;
      n_drop   <= '0;
    end else if (sweep_q) begin
      carry_q <= evict;
      if (placed) carry_new_q <= 1'b0;
      row_q   <= row_q + 1'b1;
      if (row_q == RA'(R - 1)) begin
        sweep_q <= 1'b0;
        full_q  <= nxt[W-1].v;
        gmin_q  <= nxt[W-1].s.score;
      end
    end else if (f_valid) begin
      if (full_q && f_data.score <= gmin_q) begin
        n_drop <= n_drop + 1;
      end else begin
        sweep_q  <= 1'b1;
        row_q    <= '0;
        carry_q  <= '{v: 1'b1, s: f_data};
        carry_new_q <= 1'b1;
        n_insert <= n_insert + 1;
      end
    end
  end
endmodule
