// tb_zfpv2_encoder: random coefficient blocks (all header codes, zero
// blocks, accuracy settings from 0 to 64 coded planes) are encoded; the
// concatenated fragments must equal a bit-serial software encoding, the
// announced block length must match, and a block must leave in one, two or
// three fragments (np <= 16, <= 48, more).
module tb_zfpv2_encoder;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] minexp;
  logic in_valid, in_ready, out_valid, out_ready;
  zblk_t in_blk;
  frag_t out_frag;
  zfpv2_encoder dut (.clk, .rst_n, .minexp, .in_valid, .in_ready, .in_blk,
                     .out_valid, .out_ready, .out_frag);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64a_t u;
    bit    ref_q[$], got_q[$];
    int    emax_b, np, cyc, blen;
    in_valid = 0; in_blk = '0; out_ready = 1; minexp = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bit zero;
      u = rand_coeffs(t % 3);
      zero = (t % 11 == 3);
      emax_b = $urandom_range(900, 1100);
      minexp = 16'(int'($urandom_range(0, 80)) - 40);
      minexp = 16'(emax_b - 1022 + 6) - 16'($urandom_range(0, 70));
      in_blk.zero = zero;
      in_blk.emax = 11'(emax_b);
      for (int i = 0; i < 16; i++) in_blk.v[i] = u[i];
      ref_q.delete(); got_q.delete();
      ref_encode(ref_q, zero, emax_b, u, int'(minexp));
      np = zero ? 0 : ref_np(emax_b, int'(minexp));
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      cyc = 0; blen = -1;
      forever begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_valid && out_ready) begin
          cyc++;
          if (out_frag.first) blen = int'(out_frag.blk_len);
          for (int b = 0; b < int'(out_frag.nbits); b++) got_q.push_back(out_frag.bits[b]);
          if (out_frag.last) begin
            @(posedge clk); #1;
            break;
          end
        end
        @(posedge clk); #1;
      end
      out_ready = 1;
      checks++;
      if (got_q != ref_q) begin
        failures++;
        if (failures < 6) $display("t%0d bits differ: got %0d exp %0d", t, got_q.size(), ref_q.size());
      end
      checks++;
      if (blen != ref_q.size()) begin failures++; $display("blk_len %0d exp %0d", blen, ref_q.size()); end
      checks++;
      if (cyc != ((np <= 16) ? 1 : (np <= 48) ? 2 : 3)) begin failures++; $display("cycles %0d np %0d", cyc, np); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
