// tb_zfp_bit_packer: random blocks of 1 to 1228 bits, split into random
// fragments of up to 512 bits, are packed into 256-byte chunks. The output words must equal a
// software chunk builder (blocks never straddle a chunk; each chunk closed by
// the 12-bit marker and zero fill), chunk_last must mark every 8th word, and
// a final flush must close the last chunk.
module tb_zfp_bit_packer;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  localparam int CBITS = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, flush, flush_done, out_valid, out_ready, out_chunk_last;
  frag_t in_frag;
  logic [255:0] out_data;
  zfp_bit_packer #(.CHUNK_BYTES(256)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_frag,
    .flush, .flush_done, .out_valid, .out_ready, .out_data, .out_chunk_last);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stream[$], cur[$];
  localparam int NB = 200;
  bit blocks [NB][$];
  int pads;

  initial begin
    for (int t = 0; t < NB; t++) begin
      int len;
      len = (t % 5 == 0) ? 1 : $urandom_range(12, 1228);
      for (int b = 0; b < len; b++) blocks[t].push_back(1'($urandom));
      ref_add(cur, stream, blocks[t], CBITS);
    end
    ref_close(cur, stream, CBITS);
  end

  // Driver: each block as fragments of up to 256 bits.
  initial begin
    in_valid = 0; in_frag = '0; flush = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < NB; t++) begin
      int p;
      p = 0;
      while (p < blocks[t].size()) begin
        int n;
        n = $urandom_range(1, 512);
        if (n > blocks[t].size() - p) n = blocks[t].size() - p;
        in_frag = '0;
        for (int b = 0; b < n; b++) in_frag.bits[b] = blocks[t][p + b];
        in_frag.nbits   = 10'(n);
        in_frag.first   = (p == 0);
        in_frag.last    = (p + n == blocks[t].size());
        in_frag.blk_len = 12'(blocks[t].size());
        p += n;
        in_valid = 1; #1;
        while (!in_ready) begin @(posedge clk); #2; end
        @(posedge clk); #1;
        in_valid = 0;
      end
    end
    flush = 1;
    @(posedge clk); #1;
    flush = 0;
  end

  initial begin
    int w;
    bit done;
    w = 0; done = 0; out_ready = 0; pads = 0;
    @(posedge rst_n);
    while (!done) begin
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        logic [255:0] e;
        for (int b = 0; b < 256; b++) e[b] = (256*w + b < stream.size()) ? stream[256*w + b] : 1'b0;
        checks++;
        if (out_data != e) begin failures++; if (failures < 5) $display("word %0d mismatch", w); end
        checks++;
        if (out_chunk_last != ((w + 1) % 8 == 0)) begin failures++; $display("chunk_last at %0d", w); end
        w++;
      end
      if (flush_done) done = 1;
      @(posedge clk); #1;
    end
    checks++;
    if (w * 256 != stream.size()) begin failures++; $display("words %0d exp %0d", w, stream.size() / 256); end
    $display("words %0d", w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
