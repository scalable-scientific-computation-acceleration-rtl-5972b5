// tb_zfpv2_decompressor: a software compressor produces a chunked stream
// of random smooth blocks; the decompressor must return, row by row and in
// order, exactly the doubles the software decoder reconstructs (coded planes
// kept, inverse transform, inverse conversion). Output back-pressure is
// random for the first half. With the output always ready, the decoder
// array must sustain one row per cycle over the second half.
module tb_zfpv2_decompressor;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  localparam int CBITS = 2048;
  localparam int NB = 160;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] minexp;
  logic in_valid, in_ready, in_chunk_last, out_valid, out_ready, out_blk_last;
  logic [255:0] in_data, out_data;
  zfpv2_decompressor #(.CHUNK_BYTES(256)) dut (.clk, .rst_n, .minexp, .in_valid, .in_ready,
    .in_data, .in_chunk_last, .out_valid, .out_ready, .out_data, .out_blk_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [63:0] expd [NB][16];
  bit stream[$], cur[$];

  initial begin
    for (int t = 0; t < NB; t++) begin
      bit q[$];
      u64a_t d, u;
      i64a_t iv;
      int e, np;
      q.delete();
      d = make_block(2.0 ** (t % 17 - 8), (t % 13 == 6) ? 2 : t % 2);
      e = ref_emax(d);
      u = ref_fxform(ref_cast(d));
      ref_encode(q, e == 0, e, u, -30);
      ref_add(cur, stream, q, CBITS);
      np = ref_np(e, -30);
      iv = ref_ixform(ref_truncate(u, np));
      for (int i = 0; i < 16; i++) expd[t][i] = (e == 0) ? 64'd0 : ref_icast(iv[i], e);
    end
    ref_close(cur, stream, CBITS);
  end

  initial begin
    minexp = -30;
    in_valid = 0; in_data = '0; in_chunk_last = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int w = 0; w < stream.size() / 256; w++) begin
      for (int b = 0; b < 256; b++) in_data[b] = stream[256*w + b];
      in_chunk_last = ((w + 1) % (CBITS / 256) == 0);
      in_valid = 1; #1;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  end

  initial begin
    int r, t0, t1;
    r = 0; out_ready = 0; t0 = 0; t1 = 0;
    @(posedge rst_n);
    while (r < 4 * NB) begin
      out_ready = (r >= 2 * NB) || ($urandom_range(0, 2) != 0);
      #1;
      if (r == 2 * NB + 40 && t0 == 0) t0 = $time;
      if (out_valid && out_ready) begin
        for (int x = 0; x < 4; x++) begin
          checks++;
          if (out_data[64*x +: 64] != expd[r/4][4*(r%4) + x]) begin
            failures++;
            if (failures < 6) $display("blk %0d row %0d x %0d got %h exp %h", r/4, r%4, x,
                                       out_data[64*x +: 64], expd[r/4][4*(r%4) + x]);
          end
        end
        checks++;
        if (out_blk_last != (r % 4 == 3)) failures++;
        r++;
        if (r == 4 * NB - 40) t1 = $time;
      end
      @(posedge clk); #1;
    end
    checks++;
    // 2*NB - 80 rows between t0 and t1 should take about as many cycles.
    if ((t1 - t0) / 10 > (2 * NB - 80) * 11 / 10) begin
      failures++; $display("decompressor below wire speed: %0d cycles", (t1 - t0) / 10);
    end
    $display("rows %0d, steady window %0d rows in %0d cycles", r, 2 * NB - 80, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
