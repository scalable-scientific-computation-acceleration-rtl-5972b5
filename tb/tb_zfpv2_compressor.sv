// tb_zfpv2_compressor: streams random smooth 4x4 blocks of doubles (four
// rows of four per block) through the compressor with 256-byte chunks and
// compares every compressed word with a software pipeline (conversion,
// transform, bit-serial coder, chunk builder). With the output always ready
// the input must be taken at wire speed: one row per cycle.
module tb_zfpv2_compressor;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  localparam int CBITS = 2048;
  localparam int NB = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] minexp;
  logic in_valid, in_ready, flush, flush_done, out_valid, out_ready, out_chunk_last;
  logic [255:0] in_data, out_data;
  zfpv2_compressor #(.CHUNK_BYTES(256)) dut (.clk, .rst_n, .minexp, .in_valid, .in_ready,
    .in_data, .flush, .flush_done, .out_valid, .out_ready, .out_data, .out_chunk_last);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  u64a_t blks [NB];
  bit stream[$], cur[$];
  int in_cycles;

  initial begin
    for (int t = 0; t < NB; t++) begin
      bit q[$];
      q.delete();
      blks[t] = make_block(2.0 ** (t % 17 - 8), (t % 13 == 6) ? 2 : t % 2);
      ref_encode(q, ref_emax(blks[t]) == 0, ref_emax(blks[t]),
                 ref_fxform(ref_cast(blks[t])), -30);
      ref_add(cur, stream, q, CBITS);
    end
    ref_close(cur, stream, CBITS);
  end

  initial begin
    minexp = -30;
    in_valid = 0; in_data = '0; flush = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    in_cycles = 0;
    for (int t = 0; t < NB; t++)
      for (int r = 0; r < 4; r++) begin
        for (int x = 0; x < 4; x++) in_data[64*x +: 64] = blks[t][4*r + x];
        in_valid = 1; #1;
        while (!in_ready) begin @(posedge clk); #2; in_cycles++; end
        @(posedge clk); #1;
        in_cycles++;
        in_valid = 0;
      end
    checks++;
    if (in_cycles > 4 * NB + 8) begin failures++; $display("input not at wire speed: %0d cycles", in_cycles); end
    flush = 1;
    @(posedge clk); #1;
    flush = 0;
  end

  initial begin
    int w;
    bit done;
    w = 0; done = 0; out_ready = 1;
    @(posedge rst_n);
    while (!done) begin
      #1;
      if (out_valid && out_ready) begin
        logic [255:0] e;
        for (int b = 0; b < 256; b++) e[b] = (256*w + b < stream.size()) ? stream[256*w + b] : 1'b0;
        checks++;
        if (out_data != e) begin failures++; if (failures < 5) $display("word %0d mismatch", w); end
        w++;
      end
      if (flush_done) done = 1;
      @(posedge clk); #1;
    end
    checks++;
    if (w * 256 != stream.size()) begin failures++; $display("words %0d exp %0d", w, stream.size() / 256); end
    $display("blocks %0d words %0d input cycles %0d", NB, w, in_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
