// tb_topk_sorter: random scores (from a small range, so ties occur) are fed
// to the sorter and the K ranked results compared with a software sort
// (score at every rank; document at every rank, equal scores keeping their
// arrival order). Timing: with the FIFO empty, a score that needs an
// insertion keeps the sorter busy for K/W + 1 cycles (one to pop, K/W
// sweep cycles); one below the global minimum for 1 cycle.
module tb_topk_sorter;
  import zipnn_pkg::*;
  localparam int K = 128, W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, in_valid, in_ready, rd_valid, busy;
  scored_t in_res, rd_res;
  logic [6:0] rd_idx;
  logic [31:0] n_insert, n_drop;
  topk_sorter dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_res, .rd_idx, .rd_res,
                   .rd_valid, .busy, .n_insert, .n_drop);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int unsigned score; int unsigned doc; } ent_t;
  ent_t ref_q [$];

  task automatic push(input int unsigned sc, input int unsigned doc);
    in_res = '{score: sc, doc: doc};
    in_valid = 1; #1;
    while (!in_ready) begin @(posedge clk); #2; end
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  // Stable insertion into the software list, kept at K entries.
  function automatic void ref_insert(input int unsigned sc, input int unsigned doc);
    int p;
    ent_t e;
    p = ref_q.size();
    for (int i = ref_q.size() - 1; i >= 0; i--) if (sc > ref_q[i].score) p = i;
    e.score = sc; e.doc = doc;
    ref_q.insert(p, e);
    if (ref_q.size() > K) void'(ref_q.pop_back());
  endfunction

  task automatic compare();
    while (busy) begin @(posedge clk); #1; end
    for (int r = 0; r < K; r++) begin
      rd_idx = 7'(r); #1;
      checks++;
      if (r < ref_q.size()) begin
        if (!rd_valid || rd_res.score != ref_q[r].score || rd_res.doc != ref_q[r].doc) begin
          failures++;
          if (failures < 8) $display("rank %0d got %0d/%0d exp %0d/%0d", r, rd_res.score, rd_res.doc,
                                     ref_q[r].score, ref_q[r].doc);
        end
      end else if (rd_valid) failures++;
    end
    @(posedge clk); #1;
  endtask

  task automatic timed(input int unsigned sc, input int exp_cycles);
    int c;
    push(sc, 99999);
    ref_insert(sc, 99999);
    c = 0;
    while (busy) begin @(posedge clk); #1; c++; end
    checks++;
    if (c != exp_cycles) begin failures++; $display("busy %0d cycles, exp %0d", c, exp_cycles); end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_res = '0; rd_idx = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    clear = 1; @(posedge clk); #1; clear = 0;
    // Fewer than K entries, then many more.
    for (int i = 0; i < 50; i++) begin
      int unsigned s;
      s = $urandom_range(0, 300);
      push(s, i); ref_insert(s, i);
    end
    compare();
    for (int i = 50; i < 1500; i++) begin
      int unsigned s;
      s = $urandom_range(0, 3000) + 2 * i;
      push(s, i); ref_insert(s, i);
    end
    compare();
    // Sorter is full: rate of an insert and of a drop.
    timed(ref_q[0].score + 1, K / W + 1);
    timed(0, 1);
    compare();
    checks++;
    if (n_insert + n_drop != 1502 || n_drop == 0) failures++;
    // Clear empties it.
    clear = 1; @(posedge clk); #1; clear = 0;
    ref_q.delete();
    push(7, 1); ref_insert(7, 1);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
