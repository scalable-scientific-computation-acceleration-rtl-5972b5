// dram_model: behavioural model of the on-board memory and its controller
// as seen by the memory arbiter (not synthesizable). Requests are accepted
// with random back-pressure when `calm` is low; a read burst returns one
// beat per cycle starting LAT cycles after its request; write beats are
// taken from the write channel in request order. Contents start at zero.
// The array is sparse, so any 32-bit beat address may be used.
module dram_model #(
  parameter int LAT = 10
)(
  input  logic         clk,
  input  logic         calm,
  input  logic         mem_req_valid,
  output logic         mem_req_ready,
  input  logic [31:0]  mem_req_addr,
  input  logic [8:0]   mem_req_len,
  input  logic         mem_req_write,
  input  logic         mem_wr_valid,
  output logic         mem_wr_ready,
  input  logic [255:0] mem_wr_data,
  output logic         mem_rd_valid,
  output logic [255:0] mem_rd_data,
  output int           n_req_stalls
);
  logic [255:0] mem [int];
  typedef struct { int addr; int len; } wreq_t;
  wreq_t wq [$];
  longint rd_time [$];
  logic [255:0] rd_q [$];
  longint cyc = 0;
  initial begin
    mem_req_ready = 0; mem_wr_ready = 0; mem_rd_valid = 0; mem_rd_data = '0; n_req_stalls = 0;
  end
  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && !mem_req_ready) n_req_stalls++;
    if (mem_req_valid && mem_req_ready) begin
      if (!mem_req_write) begin
        longint t0;
        t0 = (rd_time.size() > 0 && rd_time[$] >= cyc + LAT) ? rd_time[$] + 1 : cyc + LAT;
        for (int i = 0; i < int'(mem_req_len); i++) begin
          rd_q.push_back(mem.exists(int'(mem_req_addr) + i) ? mem[int'(mem_req_addr) + i] : '0);
          rd_time.push_back(t0 + i);
        end
      end else wq.push_back('{addr: int'(mem_req_addr), len: int'(mem_req_len)});
    end
    if (mem_wr_valid && mem_wr_ready) begin
      mem[wq[0].addr] = mem_wr_data;
      wq[0].addr++; wq[0].len--;
      if (wq[0].len == 0) void'(wq.pop_front());
    end
    if (rd_q.size() > 0 && rd_time[0] <= cyc + 1) begin
      mem_rd_valid <= 1; mem_rd_data <= rd_q.pop_front(); void'(rd_time.pop_front());
    end else mem_rd_valid <= 0;
    mem_req_ready <= calm || ($urandom_range(0, 3) != 0);
    mem_wr_ready  <= calm || ($urandom_range(0, 4) != 0);
  end
endmodule
