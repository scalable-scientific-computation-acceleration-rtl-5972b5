// tb_zfpv2_decoder: a software encoder and chunk builder produce a stream
// of random blocks (zero blocks and all header codes) in small chunks; the
// decoder must return every block with the coded planes intact, in order,
// and one end-of-chunk beat per chunk. Input words are offered with random
// gaps and the output is back-pressured at random.
module tb_zfpv2_decoder;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  localparam int CBITS = 2048;        // 256-byte chunks
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] minexp;
  logic in_valid, in_ready, in_chunk_last, out_valid, out_ready, out_eoc;
  logic [255:0] in_data;
  zblk_t out_blk;
  zfpv2_decoder dut (.clk, .rst_n, .minexp, .in_valid, .in_ready, .in_data,
                     .in_chunk_last, .out_valid, .out_ready, .out_blk, .out_eoc);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 300;
  u64a_t exp_u [NB];
  int    exp_e [NB];
  bit    exp_z [NB];
  bit    stream[$], cur[$];
  int    nchunks;

  initial begin
    minexp = -20;
    for (int t = 0; t < NB; t++) begin
      bit q[$];
      u64a_t u;
      q.delete();
      u = rand_coeffs(t % 3);
      exp_z[t] = (t % 9 == 4);
      exp_e[t] = exp_z[t] ? 0 : $urandom_range(1000, 1060);
      ref_encode(q, exp_z[t], exp_e[t], u, -20);
      ref_add(cur, stream, q, CBITS);
      exp_u[t] = exp_z[t] ? '{default: 0} : ref_truncate(u, ref_np(exp_e[t], -20));
    end
    ref_close(cur, stream, CBITS);
    nchunks = stream.size() / CBITS;
  end

  // Driver.
  initial begin
    in_valid = 0; in_data = '0; in_chunk_last = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int w = 0; w < stream.size() / 256; w++) begin
      for (int b = 0; b < 256; b++) in_data[b] = stream[256*w + b];
      in_chunk_last = ((w + 1) % (CBITS / 256) == 0);
      in_valid = ($urandom_range(0, 4) != 0);
      while (!in_valid) begin @(posedge clk); #1; in_valid = 1; end
      #1;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  end

  // Monitor.
  initial begin
    int nblk, neoc;
    nblk = 0; neoc = 0; out_ready = 0;
    @(posedge rst_n);
    while (nblk < NB || neoc < nchunks) begin
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        if (out_eoc) neoc++;
        else begin
          checks++;
          if (out_blk.zero != exp_z[nblk] || (!exp_z[nblk] && out_blk.emax != 11'(exp_e[nblk]))) begin
            failures++; $display("blk %0d header mismatch", nblk);
          end
          for (int i = 0; i < 16; i++) begin
            checks++;
            if (!exp_z[nblk] && out_blk.v[i] != exp_u[nblk][i]) begin
              failures++;
              if (failures < 8) $display("blk %0d c%0d got %h exp %h", nblk, i, out_blk.v[i], exp_u[nblk][i]);
            end
          end
          nblk++;
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (neoc != nchunks) failures++;
    $display("blocks %0d chunks %0d", nblk, neoc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
