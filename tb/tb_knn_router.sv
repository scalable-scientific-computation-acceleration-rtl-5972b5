// tb_knn_router: a random tuple stream (documents of 1 to 30 tuples, so a
// beat can hold several documents and a document can span several beats)
// is routed to four model engines. Each engine model accepts segments at
// random, and after a document's last segment stays busy for a random time.
// The testbench rebuilds each document from the segments an engine
// received and checks that every document arrived whole, in order, at one
// engine, closed by exactly one last flag. Timing: with long documents and
// ready engines, beats are taken one per cycle.
module tb_knn_router;
  import zipnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready;
  tbeat_t in_beat;
  logic [3:0] eng_valid, eng_ready;
  seg_t eng_seg;
  knn_router dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat, .eng_valid, .eng_ready, .eng_seg);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tuple_t stream [$];
  int doc_len [$];
  int busy_cnt [4];
  bit open [4];
  bit slow;
  // Received tuples per engine for the document it holds.
  tuple_t got [4][$];
  int next_doc;   // index of the next document expected to close

  // Engine models.
  always @(posedge clk) begin
    for (int e = 0; e < 4; e++) begin
      if (eng_valid[e] && eng_ready[e]) begin
        for (int k = 0; k < 8; k++) if (eng_seg.keep[k])
          got[e].push_back('{doc: eng_seg.doc, word: eng_seg.word[k], cnt: 32'(eng_seg.cnt[k])});
        if (eng_seg.last) begin
          busy_cnt[e] = slow ? $urandom_range(1, 40) : 0;
          check_doc(e);
        end
      end else if (busy_cnt[e] > 0) busy_cnt[e]--;
    end
  end
  always @(posedge clk)
    for (int e = 0; e < 4; e++) eng_ready[e] <= (busy_cnt[e] == 0) && (!slow || $urandom_range(0, 3) != 0);

  // Documents close in order only per engine; match by document id.
  int closed [int];
  function automatic void check_doc(input int e);
    int d, base;
    checks++;
    d = got[e][0].doc;
    base = 0;
    for (int i = 0; i < d; i++) base += doc_len[i];
    if (got[e].size() != doc_len[d]) begin
      failures++;
      $display("doc %0d: %0d tuples, exp %0d", d, got[e].size(), doc_len[d]);
    end else begin
      foreach (got[e][i]) if (got[e][i] != stream[base + i]) failures++;
    end
    if (closed.exists(d)) failures++;
    closed[d] = 1;
    got[e].delete();
  endfunction

  task automatic drive(input bit gaps);
    int nb;
    nb = (stream.size() + 7) / 8;
    for (int w = 0; w < nb; w++) begin
      in_beat = '0;
      for (int k = 0; k < 8; k++) if (8*w + k < stream.size()) begin
        in_beat.t[k] = stream[8*w + k];
        in_beat.keep[k] = 1'b1;
      end
      in_beat.last = (w == nb - 1);
      in_valid = !gaps || ($urandom_range(0, 2) != 0); #1;
      while (!(in_valid && in_ready)) begin @(posedge clk); #2; in_valid = 1; #1; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  endtask

  task automatic make(input int ndoc, input int lo, input int hi);
    stream.delete(); doc_len.delete(); closed.delete();
    for (int d = 0; d < ndoc; d++) begin
      int n;
      n = $urandom_range(lo, hi);
      doc_len.push_back(n);
      for (int i = 0; i < n; i++) stream.push_back('{doc: d, word: 10 * i, cnt: $urandom_range(1, 9)});
    end
  endtask

  initial begin
    in_valid = 0; in_beat = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    slow = 1;
    make(400, 1, 30);
    drive(1);
    repeat (200) @(posedge clk); #1;
    checks++;
    if (closed.num() != 400) begin failures++; $display("closed %0d of 400", closed.num()); end
    // Rate: documents of 64 tuples, engines always ready.
    slow = 0;
    make(20, 64, 64);
    begin
      int t;
      t = $time;
      drive(0);
      checks++;
      if (($time - t) / 10 != 160) begin failures++; $display("%0d cycles for 160 beats", ($time - t) / 10); end
    end
    repeat (20) @(posedge clk); #1;
    checks++;
    if (closed.num() != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
