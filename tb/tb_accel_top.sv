// tb_accel_top: end-to-end run of both accelerators at once, with a small
// stencil plane (NX = 32, NY = 8) and 256-byte chunks.
//
// BurstZ+: three planes of a smooth field (one region all zeros) are
// compressed in software into chunks and written to memory through the
// host endpoint; the platform is started and updates the middle plane.
// The expected output is worked out in software: decompress the three
// planes, apply the stencil in the same order of additions, compress the
// result. The compressed plane is then read back through the host endpoint
// and compared bit for bit, and its length with out_beats. The memory model
// applies random back-pressure.
// ZipNN: at the same time a bag-of-words set is streamed into the column
// decoders and the top-k result compared with a software ranking.
// Mechanisms counted (each must happen at least once): arbiter bursts held
// back for buffer space or data, memory request back-pressure, the stencil
// waiting for one of its three decompressed planes, output spanning
// several chunks, zero blocks, edge cells copied, top-k insertion sweeps
// and global-minimum drops, run-length stage on and off, more than one
// distance engine used.
module tb_accel_top;
  import zfp_ref_pkg::*;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  import zipnn_knn_ref_pkg::*;
  localparam int NX = 32, NY = 8, NE = NX / 4, CHB = 256, CW = CHB / 32, CBITS = CHB * 8;
  localparam int NBEAT = NE * NY, NBLK = NBEAT / 4;
  localparam int MINEXP = -30;
  localparam int NDOC = 200, K = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- DUT ----
  logic b_start, b_busy, b_done;
  logic signed [15:0] b_minexp;
  logic [63:0] b_coef;
  logic [2:0][31:0] b_src_addr, b_src_beats;
  logic [31:0] b_dst_addr, b_out_beats, b_n_bursts, b_n_blocked;
  logic b_host_req_valid, b_host_req_ready, b_host_req_write, b_host_wr_valid, b_host_wr_ready;
  logic b_host_rd_valid, b_host_rd_ready;
  logic [31:0] b_host_req_addr;
  logic [8:0] b_host_req_len, b_mem_req_len;
  logic [255:0] b_host_wr_data, b_host_rd_data, b_mem_wr_data, b_mem_rd_data;
  logic b_mem_req_valid, b_mem_req_ready, b_mem_req_write, b_mem_wr_valid, b_mem_wr_ready, b_mem_rd_valid;
  logic [31:0] b_mem_req_addr;
  logic [2:0] k_use_rle, k_use_delta, k_in_valid, k_in_ready;
  logic k_start, k_qvm_we, k_clear, k_rd_valid, k_done;
  logic [2:0][31:0] k_num_values;
  logic [2:0][511:0] k_in_data;
  logic [3:0] k_qvm_sel;
  logic [9:0] k_qvm_addr;
  logic [10:0] k_qvm_len;
  qent_t k_qvm_data;
  logic [6:0] k_rd_idx;
  scored_t k_rd_res;
  logic [31:0] k_n_insert, k_n_drop;

  accel_top #(.NX(NX), .NY(NY), .CHUNK_BYTES(CHB)) dut (.*);

  bit calm = 0;
  int n_mem_stalls;
  dram_model u_mem (.clk, .calm, .mem_req_valid(b_mem_req_valid), .mem_req_ready(b_mem_req_ready),
    .mem_req_addr(b_mem_req_addr), .mem_req_len(b_mem_req_len), .mem_req_write(b_mem_req_write),
    .mem_wr_valid(b_mem_wr_valid), .mem_wr_ready(b_mem_wr_ready), .mem_wr_data(b_mem_wr_data),
    .mem_rd_valid(b_mem_rd_valid), .mem_rd_data(b_mem_rd_data), .n_req_stalls(n_mem_stalls));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_heat_stall = 0, n_zero_blk = 0, n_edge = 0, eng_used = 0;
  always @(posedge clk) begin
    if (dut.u_burstz.d_valid != 3'b000 && dut.u_burstz.d_valid != 3'b111) n_heat_stall++;
    for (int e = 0; e < 4; e++)
      if (dut.u_zipnn.e_in_valid[e] && dut.u_zipnn.e_in_ready[e]) eng_used |= (1 << e);
  end

  // ---- BurstZ+ stimulus and reference ----
  real pl [3][NY][NX];       // original planes
  real dq [3][NY][NX];       // planes as the decompressors return them
  bit  cstream [3][$];       // compressed planes
  bit  exp_stream [$];

  // Value index i of block k sits at beat 4k + i/4, lane i%4.
  function automatic void blk_xy(input int k, input int i, output int y, output int x);
    int beat;
    beat = 4 * k + i / 4;
    y = beat / NE;
    x = 4 * (beat % NE) + i % 4;
  endfunction

  // Compress a plane; optionally return what decompression gives back.
  function automatic void compress(ref real p [NY][NX], ref bit out[$], ref real d [NY][NX]);
    bit cur[$];
    out.delete();
    for (int k = 0; k < NBLK; k++) begin
      u64a_t b, u;
      i64a_t iv;
      bit q[$];
      int e, y, x;
      for (int i = 0; i < 16; i++) begin blk_xy(k, i, y, x); b[i] = $realtobits(p[y][x]); end
      e = ref_emax(b);
      u = ref_fxform(ref_cast(b));
      q.delete();
      ref_encode(q, e == 0, e, u, MINEXP);
      ref_add(cur, out, q, CBITS);
      iv = ref_ixform(ref_truncate(u, ref_np(e, MINEXP)));
      for (int i = 0; i < 16; i++) begin
        blk_xy(k, i, y, x);
        d[y][x] = (e == 0) ? 0.0 : $bitstoreal(ref_icast(iv[i], e));
      end
    end
    ref_close(cur, out, CBITS);
  endfunction

  task automatic host_write(input int addr, input bit s[$]);
    for (int c = 0; c < s.size() / CBITS; c++) begin
      b_host_req_addr = addr + CW * c; b_host_req_len = 9'(CW); b_host_req_write = 1;
      b_host_req_valid = 1; #1;
      while (!b_host_req_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1; b_host_req_valid = 0;
      for (int w = 0; w < CW; w++) begin
        for (int b = 0; b < 256; b++) b_host_wr_data[b] = s[c * CBITS + 256 * w + b];
        b_host_wr_valid = 1; #1;
        while (!b_host_wr_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1; b_host_wr_valid = 0;
      end
    end
  endtask

  task automatic host_read_check(input int addr, input int nbeats);
    for (int c = 0; c < nbeats / CW; c++) begin
      b_host_req_addr = addr + CW * c; b_host_req_len = 9'(CW); b_host_req_write = 0;
      b_host_req_valid = 1; #1;
      while (!b_host_req_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1; b_host_req_valid = 0;
      for (int w = 0; w < CW; w++) begin
        b_host_rd_ready = 1; #1;
        while (!b_host_rd_valid) begin @(posedge clk); #1; end
        checks++;
        for (int b = 0; b < 256; b++)
          if (c * CBITS + 256 * w + b >= exp_stream.size() ||
              b_host_rd_data[b] != exp_stream[c * CBITS + 256 * w + b]) begin
            failures++;
            if (failures < 6) $display("output chunk %0d word %0d differs", c, w);
            break;
          end
        @(posedge clk); #1; b_host_rd_ready = 0;
      end
    end
  endtask

  task automatic run_burstz();
    real outp [NY][NX], dummy [NY][NX];
    real k;
    int nchunks;
    k = 1.0 / 7.0;
    for (int p = 0; p < 3; p++)
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++)
          pl[p][y][x] = (y < 2 && x < 16 && p == 1) ? 0.0 :
                        100.0 + 3.0 * p + 0.5 * y + 0.25 * x + 1.0e-4 * $urandom_range(0, 1000);
    for (int p = 0; p < 3; p++) compress(pl[p], cstream[p], dq[p]);
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        if (x == 0 || x == NX - 1 || y == 0 || y == NY - 1) begin
          outp[y][x] = dq[1][y][x];
          n_edge++;
        end else
          outp[y][x] = k * (((dq[1][y][x-1] + dq[1][y][x+1]) + (dq[1][y-1][x] + dq[1][y+1][x])) +
                            ((dq[0][y][x] + dq[2][y][x]) + dq[1][y][x]));
      end
    compress(outp, exp_stream, dummy);
    for (int kb = 0; kb < NBLK; kb++) begin
      bit z;
      int y, x;
      z = 1;
      for (int i = 0; i < 16; i++) begin blk_xy(kb, i, y, x); if (pl[1][y][x] != 0.0) z = 0; end
      if (z) n_zero_blk++;
    end
    // Load the compressed planes.
    for (int p = 0; p < 3; p++) begin
      host_write(10000 * (p + 1), cstream[p]);
      b_src_addr[p] = 10000 * (p + 1);
      b_src_beats[p] = cstream[p].size() / 256;
    end
    b_dst_addr = 50000;
    b_minexp = MINEXP;
    b_coef = $realtobits(k);
    repeat (20) @(posedge clk); #1;
    b_start = 1; @(posedge clk); #1; b_start = 0;
    while (!b_done) begin @(posedge clk); #1; end
    nchunks = exp_stream.size() / CBITS;
    checks++;
    if (b_out_beats != nchunks * CW) begin
      failures++;
      $display("out_beats %0d exp %0d", b_out_beats, nchunks * CW);
    end
    repeat (50) @(posedge clk); #1;
    host_read_check(50000, nchunks * CW);
    $display("BurstZ+: %0d input chunks per plane, %0d output chunks", b_src_beats[1] / CW, nchunks);
  endtask

  // ---- ZipNN stimulus and reference ----
  bq_t kenc [3];
  uq_t kcol [3], qw, qf;
  int unsigned scores [NDOC], docid [NDOC];

  task automatic kdrive(input int c);
    for (int w = 0; w < (kenc[c].size() + 63) / 64; w++) begin
      for (int b = 0; b < 64; b++)
        k_in_data[c][8*b +: 8] = (64*w + b < kenc[c].size()) ? kenc[c][64*w + b] : 8'd0;
      k_in_valid[c] = 1; #1;
      while (!k_in_ready[c]) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      k_in_valid[c] = 0;
    end
  endtask

  task automatic run_zipnn(input bit rle);
    uq_t c1, sc;
    int unsigned d;
    foreach (kcol[c]) kcol[c].delete();
    d = 0;
    qw = rand_words(50, 300);
    qf.delete();
    foreach (qw[i]) qf.push_back($urandom_range(1, 20));
    for (int i = 0; i < NDOC; i++) begin
      uq_t dw, dc;
      d += $urandom_range(1, 4);
      docid[i] = d;
      dw = rand_words($urandom_range(1, 30), 300);
      foreach (dw[j]) begin
        dc.push_back($urandom_range(1, 20));
        kcol[0].push_back(d); kcol[1].push_back(dw[j]); kcol[2].push_back(dc[j]);
      end
      scores[i] = ref_score(dw, dc, qw, qf);
    end
    k_use_rle = {2'b00, rle};
    k_use_delta = 3'b011;
    c1 = delta_encode(kcol[0]);
    if (rle) c1 = rle_encode(c1);
    kenc[0] = pgv_encode(c1, 32);           k_num_values[0] = c1.size();
    kenc[1] = pgv_encode(delta_encode(kcol[1]), 32); k_num_values[1] = kcol[1].size();
    kenc[2] = pgv_encode(kcol[2], 32);      k_num_values[2] = kcol[2].size();
    k_qvm_sel = '1;
    foreach (qw[i]) begin
      k_qvm_we = 1; k_qvm_addr = 10'(i); k_qvm_data = '{word: qw[i], freq: 16'(qf[i])};
      @(posedge clk); #1;
    end
    k_qvm_we = 0; k_qvm_len = 11'(qw.size());
    k_clear = 1; @(posedge clk); #1; k_clear = 0;
    k_start = 1; @(posedge clk); #1; k_start = 0;
    fork kdrive(0); kdrive(1); kdrive(2); join
    while (!k_done) begin @(posedge clk); #1; end
    for (int i = 0; i < NDOC; i++) sc.push_back(scores[i]);
    sc.rsort();
    for (int r = 0; r < K; r++) begin
      k_rd_idx = 7'(r); #1;
      checks++;
      if (!k_rd_valid || k_rd_res.score != sc[r]) begin
        failures++;
        if (failures < 8) $display("rank %0d score %0d exp %0d", r, k_rd_res.score, sc[r]);
      end
    end
    @(posedge clk); #1;
    $display("ZipNN (rle %0d): inserts %0d, drops %0d", rle, k_n_insert, k_n_drop);
  endtask

  int tot_ins = 0, tot_drop = 0, rle_modes = 0;

  initial begin
    b_start = 0; b_minexp = 0; b_coef = 0; b_src_addr = '0; b_src_beats = '0; b_dst_addr = 0;
    b_host_req_valid = 0; b_host_req_addr = 0; b_host_req_len = 0; b_host_req_write = 0;
    b_host_wr_valid = 0; b_host_wr_data = '0; b_host_rd_ready = 0;
    k_use_rle = 0; k_use_delta = 0; k_in_valid = 0; k_start = 0; k_qvm_we = 0; k_clear = 0;
    k_num_values = '0; k_in_data = '0; k_qvm_sel = 0; k_qvm_addr = 0; k_qvm_len = 0;
    k_qvm_data = '0; k_rd_idx = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    fork
      run_burstz();
      begin
        run_zipnn(1); tot_ins += k_n_insert; tot_drop += k_n_drop; rle_modes |= 2;
        run_zipnn(0); tot_ins += k_n_insert; tot_drop += k_n_drop; rle_modes |= 1;
      end
    join
    $display("arbiter bursts %0d, held back %0d cycles; memory stalls %0d; stencil waits for a plane %0d",
             b_n_bursts, b_n_blocked, n_mem_stalls, n_heat_stall);
    $display("zero blocks %0d, edge cells %0d, engines used %b", n_zero_blk, n_edge, eng_used[3:0]);
    checks++; if (b_n_blocked == 0)          begin failures++; $display("no arbiter hold-back"); end
    checks++; if (n_mem_stalls == 0)         begin failures++; $display("no memory back-pressure"); end
    checks++; if (n_heat_stall == 0)         begin failures++; $display("stencil never waited for a plane"); end
    checks++; if (exp_stream.size() / CBITS < 2) begin failures++; $display("output fits one chunk"); end
    checks++; if (n_zero_blk == 0)           begin failures++; $display("no zero block"); end
    checks++; if (n_edge == 0)               begin failures++; $display("no edge cell"); end
    checks++; if (tot_ins == 0)              begin failures++; $display("no insertion sweep"); end
    checks++; if (tot_drop == 0)             begin failures++; $display("no global-minimum drop"); end
    checks++; if (rle_modes != 3)            begin failures++; $display("run-length mode not switched"); end
    checks++; if ($countones(eng_used) < 2)  begin failures++; $display("one engine only"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
