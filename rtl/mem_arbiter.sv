// mem_arbiter: shares one burst-oriented memory port between N_EP
// endpoints (host, compressor and decompressor pipelines).
//
// Each endpoint first posts a burst request (beat address, length 1 to
// MAX_BURST beats, read or write), then moves its data through its own
// buffers: a write buffer that collects the burst's data and a read buffer
// that receives it. The scheduler visits the endpoints in round-robin order
// and starts a burst only when it can finish without waiting on the
// endpoint: a read only when the endpoint's read buffer has room for the
// whole burst (space is reserved at issue), a write only when the whole
// burst is already in the write buffer. An endpoint that posts a request
// and never moves its data can therefore block only itself. Reads may be
// outstanding at the memory while later bursts are issued; their data is
// steered back by a tag queue in issue order. Write data follows its
// request on the memory's write channel, one burst at a time.
//
// Interface: per-endpoint arrays of req_*/wr_*/rd_* valid/ready channels;
// the memory side is mem_req_* (one request per burst), mem_wr_* (write
// beats, in request order) and mem_rd_valid/mem_rd_data (read beats in
// request order, always accepted). n_bursts counts issued bursts and
// n_blocked counts cycles in which a request was waiting for buffer space
// or data.
//
// The burst interface, per-endpoint buffers and the issue rule follow the
// document; round-robin order, buffer depth and the tag queue are this
// design's own choices.
module mem_arbiter #(
  parameter int unsigned N_EP      = 5,
  parameter int unsigned W         = 256,
  parameter int unsigned AW        = 32,
  parameter int unsigned MAX_BURST = 256,   // 8 KB of 32-byte beats
  parameter int unsigned BUF_DEPTH = 512,
  parameter int unsigned TAGS      = 16,
  localparam int unsigned LW = $clog2(MAX_BURST + 1),
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1),
  localparam int unsigned EA = (N_EP > 1) ? $clog2(N_EP) : 1
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_EP-1:0]        req_valid,
  output logic [N_EP-1:0]        req_ready,
  input  logic [N_EP-1:0][AW-1:0] req_addr,
  input  logic [N_EP-1:0][LW-1:0] req_len,
  input  logic [N_EP-1:0]        req_write,
  input  logic [N_EP-1:0]        wr_valid,
  output logic [N_EP-1:0]        wr_ready,
  input  logic [N_EP-1:0][W-1:0] wr_data,
  output logic [N_EP-1:0]        rd_valid,
  input  logic [N_EP-1:0]        rd_ready,
  output logic [N_EP-1:0][W-1:0] rd_data,
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic [AW-1:0]          mem_req_addr,
  output logic [LW-1:0]          mem_req_len,
  output logic                   mem_req_write,
  output logic                   mem_wr_valid,
  input  logic                   mem_wr_ready,
  output logic [W-1:0]           mem_wr_data,
  input  logic                   mem_rd_valid,
  input  logic [W-1:0]           mem_rd_data,
  output logic [31:0]            n_bursts,
  output logic [31:0]            n_blocked
);
  // Posted requests, one per endpoint.
  logic [N_EP-1:0]         pend_q, pend_w_q;
  logic [N_EP-1:0][AW-1:0] pend_a_q;
  logic [N_EP-1:0][LW-1:0] pend_l_q;
  logic [N_EP-1:0][CW-1:0] free_q;      // read buffer space not yet reserved
  logic [N_EP-1:0][CW-1:0] wcount;
  logic [N_EP-1:0]         wb_valid, wb_ready, rb_in_valid;
  logic [N_EP-1:0][W-1:0]  wb_data;

  // Outstanding read bursts: endpoint and beats still to come.
  typedef struct packed {
    logic [EA-1:0] ep;
    logic [LW-1:0] len;
  } tag_t;
  logic tag_in_valid, tag_in_ready, tag_valid, tag_pop;
  tag_t tag_in, tag_head;
  logic [LW-1:0] tag_done_q;
  sync_fifo #(.W($bits(tag_t)), .DEPTH(TAGS)) u_tags (
    .clk, .rst_n, .in_valid(tag_in_valid), .in_ready(tag_in_ready), .in_data(tag_in),
    .out_valid(tag_valid), .out_ready(tag_pop), .out_data(tag_head), .count());

  for (genvar i = 0; i < N_EP; i++) begin : g_ep
    sync_fifo #(.W(W), .DEPTH(BUF_DEPTH)) u_wbuf (
      .clk, .rst_n, .in_valid(wr_valid[i]), .in_ready(wr_ready[i]), .in_data(wr_data[i]),
      .out_valid(wb_valid[i]), .out_ready(wb_ready[i]), .out_data(wb_data[i]), .count(wcount[i]));
    sync_fifo #(.W(W), .DEPTH(BUF_DEPTH)) u_rbuf (
      .clk, .rst_n, .in_valid(rb_in_valid[i]), .in_ready(), .in_data(mem_rd_data),
      .out_valid(rd_valid[i]), .out_ready(rd_ready[i]), .out_data(rd_data[i]), .count());
    assign rb_in_valid[i] = mem_rd_valid && tag_valid && (tag_head.ep == EA'(i));
  end
  assign req_ready = ~pend_q;
  assign tag_pop   = mem_rd_valid && tag_valid && (tag_done_q + 1'b1 == tag_head.len);

  // Scheduler.
  typedef enum logic [1:0] {S_PICK, S_REQ, S_WDATA} state_e;
  state_e        state_q;
  logic [EA-1:0] rr_q, sel_q;
  logic [LW-1:0] wleft_q;
  logic [N_EP-1:0] can;
  logic          any;
  logic [EA-1:0] pick;
  always_comb begin
    for (int i = 0; i < N_EP; i++)
      can[i] = pend_q[i] && (pend_w_q[i] ? (wcount[i] >= CW'(pend_l_q[i]))
                                         : (free_q[i] >= CW'(pend_l_q[i])));
    pick = rr_q;
    any  = 1'b0;
    for (int i = N_EP; i >= 1; i--) begin
      if (can[(int'(rr_q) + i) % N_EP]) begin
        pick = EA'((int'(rr_q) + i) % N_EP);
        any  = 1'b1;
      end
    end
  end

  assign mem_req_valid = (state_q == S_REQ) && (pend_w_q[sel_q] || tag_in_ready);
  assign mem_req_addr  = pend_a_q[sel_q];
  assign mem_req_len   = pend_l_q[sel_q];
  assign mem_req_write = pend_w_q[sel_q];
  assign tag_in_valid  = (state_q == S_REQ) && mem_req_ready && !pend_w_q[sel_q];
  assign tag_in        = '{ep: sel_q, len: pend_l_q[sel_q]};

  assign mem_wr_valid = (state_q == S_WDATA) && wb_valid[sel_q];
  assign mem_wr_data  = wb_data[sel_q];
  always_comb begin
    wb_ready = '0;
    if (state_q == S_WDATA) wb_ready[sel_q] = mem_wr_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= '0;
      pend_w_q   <= '0;
      pend_a_q   <= '0;
      pend_l_q   <= '0;
      for (int i = 0; i < N_EP; i++) free_q[i] <= CW'(BUF_DEPTH);
      state_q    <= S_PICK;
      rr_q       <= '0;
      sel_q      <= '0;
      wleft_q    <= '0;
      tag_done_q <= '0;
      n_bursts   <= '0;
      n_blocked  <= '0;
    end else begin
      for (int i = 0; i < N_EP; i++) begin
        logic [CW-1:0] f;
        f = free_q[i];
        if (rd_valid[i] && rd_ready[i]) f = f + 1'b1;
        if (state_q == S_REQ && mem_req_valid && mem_req_ready && !pend_w_q[i] && sel_q == EA'(i))
          f = f - CW'(pend_l_q[i]);
        free_q[i] <= f;
        if (req_valid[i] && req_ready[i]) begin
          pend_q[i]   <= 1'b1;
          pend_w_q[i] <= req_write[i];
          pend_a_q[i] <= req_addr[i];
          pend_l_q[i] <= req_len[i];
        end
      end
      if (mem_rd_valid && tag_valid) tag_done_q <= tag_pop ? '0 : tag_done_q + 1'b1;
      if ((pend_q & ~can) != '0) n_blocked <= n_blocked + 1;
      case (state_q)
        S_PICK: if (any) begin
          sel_q   <= pick;
          rr_q    <= pick;
          state_q <= S_REQ;
        end
        S_REQ: if (mem_req_valid && mem_req_ready) begin
          pend_q[sel_q] <= 1'b0;
          n_bursts      <= n_bursts + 1;
          wleft_q       <= pend_l_q[sel_q];
          state_q       <= pend_w_q[sel_q] ? S_WDATA : S_PICK;
        end
        default: if (mem_wr_valid && mem_wr_ready) begin
          wleft_q <= wleft_q - 1'b1;
          if (wleft_q == LW'(1)) state_q <= S_PICK;
        end
      endcase
    end
  end
endmodule
