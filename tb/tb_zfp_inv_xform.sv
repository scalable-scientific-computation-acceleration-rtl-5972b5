// tb_zfp_inv_xform: random coefficient blocks through the inverse
// transform, compared with a software inverse lifting reference; also checks
// that forward-then-inverse in software and hardware agree (the ZFP
// transform pair is near-lossless).
module tb_zfp_inv_xform;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid;
  zblk_t in_blk, out_blk;
  zfp_inv_xform dut (.clk, .rst_n, .in_valid, .in_ready, .in_blk,
                     .out_valid, .out_ready(1'b1), .out_blk);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i64a_t a, r;
    u64a_t u;
    in_valid = 0; in_blk = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) a[i] = longint'({$urandom, $urandom}) >>> $urandom_range(2, 40);
      u = ref_fxform(a);
      for (int i = 0; i < 16; i++) in_blk.v[i] = u[i];
      in_blk.emax = 11'(t + 1);
      in_blk.zero = 0;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || out_blk.emax != in_blk.emax) begin failures++; $display("no output"); end
      r = ref_ixform(u);
      for (int i = 0; i < 16; i++) begin
        longint d;
        checks++;
        if (out_blk.v[i] != r[i]) begin
          failures++;
          if (failures < 10) $display("t%0d v%0d got %h exp %h", t, i, out_blk.v[i], r[i]);
        end
        d = longint'(out_blk.v[i]) - a[i];
        checks++;
        if (d > 16 || d < -16) begin failures++; $display("roundtrip error %0d", d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
