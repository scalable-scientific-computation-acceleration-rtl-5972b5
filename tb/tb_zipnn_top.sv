// tb_zipnn_top: end-to-end k-NN search over a compressed bag-of-words set.
//
// Random documents (1 to 40 distinct sorted words, counts 1 to 20) are
// split into the three columns, compressed in software (document ids:
// delta + run-length + Group Varint; words: delta + Group Varint; counts:
// Group Varint) and streamed into the three column decoders, with the query
// loaded into every engine's QVM. When done rises, the K ranked results are
// read and compared with the software ranking: the score at each rank must
// match, and the document too where its score is unique. Two queries are
// run, the second after a clear. The test also checks that both insertion
// sweeps and global-minimum drops happened.
module tb_zipnn_top;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  import zipnn_knn_ref_pkg::*;
  localparam int K = 128;
  localparam int NDOC = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] use_rle, use_delta, in_valid, in_ready;
  logic start, qvm_we, clear, rd_valid, done;
  logic [2:0][31:0] num_values;
  logic [2:0][511:0] in_data;
  logic [3:0] qvm_sel;
  logic [9:0] qvm_addr;
  logic [10:0] qvm_len;
  qent_t qvm_data;
  logic [6:0] rd_idx;
  scored_t rd_res;
  logic [31:0] n_insert, n_drop;

  zipnn_top dut (.clk, .rst_n, .use_rle, .use_delta, .start, .num_values, .in_valid, .in_ready,
    .in_data, .qvm_sel, .qvm_we, .qvm_addr, .qvm_data, .qvm_len, .clear, .rd_idx, .rd_res,
    .rd_valid, .done, .n_insert, .n_drop);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t enc [3];
  uq_t col [3];
  uq_t qw, qf;
  int unsigned scores [NDOC];
  int unsigned docid [NDOC];
  int tot_insert = 0, tot_drop = 0;

  task automatic drive(input int c);
    for (int w = 0; w < (enc[c].size() + 63) / 64; w++) begin
      for (int b = 0; b < 64; b++)
        in_data[c][8*b +: 8] = (64*w + b < enc[c].size()) ? enc[c][64*w + b] : 8'd0;
      in_valid[c] = ($urandom_range(0, 3) != 0); #1;
      while (!(in_valid[c] && in_ready[c])) begin @(posedge clk); #2; in_valid[c] = 1; end
      @(posedge clk); #1;
      in_valid[c] = 0;
    end
  endtask

  task automatic run_query();
    uq_t c1;
    int unsigned d;
    foreach (col[c]) col[c].delete();
    d = 0;
    qw = rand_words(60, 400);
    qf.delete();
    foreach (qw[i]) qf.push_back($urandom_range(1, 20));
    for (int i = 0; i < NDOC; i++) begin
      uq_t dw, dc;
      d += $urandom_range(1, 5);
      docid[i] = d;
      dw = rand_words($urandom_range(1, 40), 400);
      foreach (dw[j]) begin
        dc.push_back($urandom_range(1, 20));
        col[0].push_back(d);
        col[1].push_back(dw[j]);
        col[2].push_back(dc[j]);
      end
      scores[i] = ref_score(dw, dc, qw, qf);
    end
    c1 = rle_encode(delta_encode(col[0]));
    enc[0] = pgv_encode(c1, 32);
    num_values[0] = c1.size();
    enc[1] = pgv_encode(delta_encode(col[1]), 32);
    num_values[1] = col[1].size();
    enc[2] = pgv_encode(col[2], 32);
    num_values[2] = col[2].size();
    // Load the query into all QVMs.
    qvm_sel = '1;
    foreach (qw[i]) begin
      qvm_we = 1; qvm_addr = 10'(i); qvm_data = '{word: qw[i], freq: 16'(qf[i])};
      @(posedge clk); #1;
    end
    qvm_we = 0; qvm_len = 11'(qw.size());
    clear = 1; @(posedge clk); #1; clear = 0;
    start = 1; @(posedge clk); #1; start = 0;
    fork
      drive(0);
      drive(1);
      drive(2);
    join
    while (!done) begin @(posedge clk); #1; end
    tot_insert += n_insert;
    tot_drop += n_drop;
    $display("query: %0d tuples, inserts %0d, drops %0d", col[0].size(), n_insert, n_drop);
    // Reference ranking: sort document indices by score, descending.
    begin
      uq_t sc;
      for (int i = 0; i < NDOC; i++) sc.push_back(scores[i]);
      sc.rsort();
      for (int r = 0; r < K; r++) begin
        int cnt, who;
        rd_idx = 7'(r); #1;
        checks++;
        if (!rd_valid || rd_res.score != sc[r]) begin
          failures++;
          if (failures < 8) $display("rank %0d score %0d exp %0d", r, rd_res.score, sc[r]);
        end
        cnt = 0; who = 0;
        for (int i = 0; i < NDOC; i++) if (scores[i] == sc[r]) begin cnt++; who = i; end
        if (cnt == 1) begin
          checks++;
          if (rd_res.doc != docid[who]) begin
            failures++;
            if (failures < 8) $display("rank %0d doc %0d exp %0d", r, rd_res.doc, docid[who]);
          end
        end
      end
    end
    checks++;
    if (n_insert + n_drop != NDOC) begin
      failures++;
      $display("scores seen %0d exp %0d", n_insert + n_drop, NDOC);
    end
  endtask

  initial begin
    use_rle = 3'b001; use_delta = 3'b011; in_valid = 0; start = 0; num_values = '0;
    in_data = '0; qvm_sel = '0; qvm_we = 0; qvm_addr = '0; qvm_data = '0; qvm_len = '0;
    clear = 0; rd_idx = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    run_query();
    run_query();
    checks++;
    if (tot_insert == 0 || tot_drop == 0) begin
      failures++;
      $display("insert or drop path never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
