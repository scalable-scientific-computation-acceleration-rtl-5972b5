// sync_fifo: single-clock first-in first-out buffer held in a memory array.
//
// Used as the chunk-sized input buffer of each decoder, as the score buffer
// in front of the top-k sorter and as endpoint buffers in the memory
// arbiter. Write when in_valid && in_ready, read when out_valid && out_ready;
// data written in one cycle can be read in the next. count reports the
// occupancy.
module sync_fifo #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 16
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;

  assign in_ready  = (count < ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != 0);
  assign out_data  = mem[rd_q];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wr_q] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      logic w, r;
      w = in_valid && in_ready;
      r = out_valid && out_ready;
      if (w) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (r) rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(w) - ($clog2(DEPTH+1))'(r);
    end
  end
endmodule
