// tb_mem_arbiter: five endpoints share a behavioural burst memory (fixed
// read latency, random request and write back-pressure). Each endpoint
// writes random bursts to its own address region and reads them back, with
// a random read drain rate, so bursts are held back for want of read
// buffer space or write data. Every read beat is compared with what was
// written. Timing: one endpoint alone reading a 256-beat burst from an idle
// memory receives it at one beat per cycle.
module tb_mem_arbiter;
  localparam int N = 5, W = 256, LAT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req_valid, req_ready, req_write, wr_valid, wr_ready, rd_valid, rd_ready;
  logic [N-1:0][31:0] req_addr;
  logic [N-1:0][8:0] req_len;
  logic [N-1:0][W-1:0] wr_data, rd_data;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_wr_valid, mem_wr_ready, mem_rd_valid;
  logic [31:0] mem_req_addr, n_bursts, n_blocked;
  logic [8:0] mem_req_len;
  logic [W-1:0] mem_wr_data, mem_rd_data;

  mem_arbiter dut (.clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_len, .req_write,
    .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .mem_req_valid,
    .mem_req_ready, .mem_req_addr, .mem_req_len, .mem_req_write, .mem_wr_valid, .mem_wr_ready,
    .mem_wr_data, .mem_rd_valid, .mem_rd_data, .n_bursts, .n_blocked);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural burst memory: requests are queued; writes take their data
  // from the write channel, reads return data LAT cycles after issue.
  logic [W-1:0] mem [int];
  typedef struct { bit wr; int addr; int len; } mreq_t;
  mreq_t mq [$];
  longint rd_time [$];
  logic [W-1:0] rd_q [$];
  bit calm;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && mem_req_ready) begin
      mreq_t r;
      r.wr = mem_req_write; r.addr = mem_req_addr; r.len = mem_req_len;
      if (!r.wr) for (int i = 0; i < r.len; i++) begin
        rd_q.push_back(mem.exists(r.addr + i) ? mem[r.addr + i] : '0);
        rd_time.push_back(cyc + LAT + i);
      end else mq.push_back(r);
    end
    if (mem_wr_valid && mem_wr_ready) begin
      mem[mq[0].addr] = mem_wr_data;
      mq[0].addr++; mq[0].len--;
      if (mq[0].len == 0) void'(mq.pop_front());
    end
    if (rd_q.size() > 0 && rd_time[0] <= cyc + 1) begin
      mem_rd_valid <= 1; mem_rd_data <= rd_q.pop_front(); void'(rd_time.pop_front());
    end else mem_rd_valid <= 0;
    mem_req_ready <= calm || ($urandom_range(0, 3) != 0);
    mem_wr_ready  <= calm || ($urandom_range(0, 4) != 0);
  end

  task automatic ep_run(input int e, input int nb);
    logic [W-1:0] data [$];
    int lens [$];
    int base;
    base = e * 100000;
    for (int b = 0; b < nb; b++) begin
      int len;
      len = $urandom_range(1, 256);
      lens.push_back(len);
      // Write burst: request, then data.
      req_addr[e] = base + 256 * b; req_len[e] = 9'(len); req_write[e] = 1; req_valid[e] = 1;
      @(posedge clk); while (!req_ready[e]) @(posedge clk);
      #1 req_valid[e] = 0;
      for (int i = 0; i < len; i++) begin
        logic [W-1:0] d;
        d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        data.push_back(d);
        wr_data[e] = d; wr_valid[e] = 1;
        @(posedge clk); while (!wr_ready[e]) @(posedge clk);
        #1 wr_valid[e] = 0;
        if ($urandom_range(0, 7) == 0) begin @(posedge clk); #1; end
      end
    end
    for (int b = 0; b < nb; b++) begin
      req_addr[e] = base + 256 * b; req_len[e] = 9'(lens[b]); req_write[e] = 0; req_valid[e] = 1;
      @(posedge clk); while (!req_ready[e]) @(posedge clk);
      #1 req_valid[e] = 0;
      for (int i = 0; i < lens[b]; i++) begin
        forever begin
          rd_ready[e] = (e == 0) || ($urandom_range(0, 2) == 0);
          #1;
          if (rd_valid[e] && rd_ready[e]) break;
          @(posedge clk); #1;
        end
        checks++;
        if (rd_data[e] != data[0]) begin
          failures++;
          if (failures < 6) $display("ep %0d burst %0d beat %0d mismatch", e, b, i);
        end
        void'(data.pop_front());
        @(posedge clk); #1;
        rd_ready[e] = 0;
      end
    end
  endtask

  initial begin
    req_valid = 0; req_addr = '0; req_len = '0; req_write = 0; wr_valid = 0; wr_data = '0;
    rd_ready = 0; mem_req_ready = 0; mem_wr_ready = 0; mem_rd_valid = 0; mem_rd_data = '0;
    calm = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    fork
      ep_run(0, 6);
      ep_run(1, 6);
      ep_run(2, 6);
      ep_run(3, 6);
      ep_run(4, 6);
    join
    checks++;
    if (n_blocked == 0) begin failures++; $display("no burst was ever held back"); end
    $display("bursts %0d, blocked cycles %0d", n_bursts, n_blocked);
    // Rate: one 256-beat read alone on a calm memory.
    calm = 1;
    repeat (5) @(posedge clk); #1;
    req_addr[1] = 100000; req_len[1] = 9'd256; req_write[1] = 0; req_valid[1] = 1;
    @(posedge clk); #1 req_valid[1] = 0;
    rd_ready[1] = 1;
    while (!rd_valid[1]) begin @(posedge clk); #1; end
    begin
      int n, t;
      n = 0; t = 0;
      while (n < 256) begin
        if (rd_valid[1]) n++;
        t++;
        @(posedge clk); #1;
      end
      checks++;
      if (t != 256) begin failures++; $display("256 beats took %0d cycles", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
