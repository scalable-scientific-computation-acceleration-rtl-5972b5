// tb_cosine_engine: random documents are sent as segments of up to eight
// sorted <word, count> pairs against a random query in the QVM, with random
// input gaps and output back-pressure; each score is compared with the
// software model. Timing: for a document with no query words in reach (all
// its words below the first query word), each segment is consumed in one
// cycle, and the divider takes 34 cycles from the last segment to out_valid.
module tb_cosine_engine;
  import zipnn_pkg::*;
  import zipnn_knn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic qvm_we, in_valid, in_ready, out_valid, out_ready;
  logic [9:0] qvm_addr;
  logic [10:0] qvm_len;
  qent_t qvm_data;
  seg_t in_seg;
  scored_t out_res;
  cosine_engine dut (.clk, .rst_n, .qvm_we, .qvm_addr, .qvm_data, .qvm_len, .in_valid, .in_ready,
                     .in_seg, .out_valid, .out_ready, .out_res);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uq_t qw, qf, dw, dc;

  task automatic send_doc(input int unsigned doc, input bit gaps);
    int ns;
    ns = (dw.size() + 7) / 8;
    for (int s = 0; s < ns; s++) begin
      in_seg = '0;
      in_seg.doc = doc;
      in_seg.last = (s == ns - 1);
      for (int k = 0; k < 8; k++) if (8*s + k < dw.size()) begin
        in_seg.word[k] = dw[8*s + k];
        in_seg.cnt[k] = 16'(dc[8*s + k]);
        in_seg.keep[k] = 1'b1;
      end
      in_valid = !gaps || ($urandom_range(0, 2) != 0); #1;
      while (!(in_valid && in_ready)) begin @(posedge clk); #2; in_valid = 1; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  endtask

  task automatic get_result(input int unsigned doc, input int unsigned exp, output int cyc);
    cyc = 0;
    forever begin
      out_ready = ($urandom_range(0, 2) != 0); #1;
      if (out_valid && out_ready) break;
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (out_res.score != exp || out_res.doc != doc) begin
      failures++;
      if (failures < 8) $display("doc %0d score %0d exp %0d", out_res.doc, out_res.score, exp);
    end
    @(posedge clk); #1;
    out_ready = 0;
  endtask

  initial begin
    int c;
    qvm_we = 0; qvm_addr = 0; qvm_data = '0; qvm_len = 0; in_valid = 0; in_seg = '0; out_ready = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int q = 0; q < 3; q++) begin
      qw = rand_words(q == 2 ? 1000 : $urandom_range(1, 80), 1200);
      qf.delete();
      foreach (qw[i]) qf.push_back($urandom_range(1, q == 1 ? 1000 : 30));
      foreach (qw[i]) begin
        qvm_we = 1; qvm_addr = 10'(i); qvm_data = '{word: qw[i], freq: 16'(qf[i])};
        @(posedge clk); #1;
      end
      qvm_we = 0; qvm_len = 11'(qw.size());
      for (int d = 0; d < 60; d++) begin
        dw = rand_words($urandom_range(1, 70), 1200);
        dc.delete();
        foreach (dw[i]) dc.push_back($urandom_range(1, q == 1 ? 1000 : 25));
        fork
          send_doc(d, 1);
          get_result(d, ref_score(dw, dc, qw, qf), c);
        join
      end
    end
    // Timing: words all below the query's first word.
    qvm_we = 1; qvm_addr = 0; qvm_data = '{word: 5000, freq: 3}; @(posedge clk); #1;
    qvm_we = 0; qvm_len = 1;
    dw.delete(); dc.delete();
    for (int i = 0; i < 40; i++) begin dw.push_back(i); dc.push_back(2); end
    fork
      send_doc(77, 0);
      begin
        // 5 segments in 5 consecutive cycles, then 34 cycles of division.
        int t0;
        t0 = 0;
        while (!in_valid) begin @(posedge clk); #1; end
        while (!out_valid) begin @(posedge clk); #1; t0++; end
        checks++;
        if (t0 != 5 + 34) begin failures++; $display("latency %0d exp %0d", t0, 5 + 34); end
      end
    join
    get_result(77, 0, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
