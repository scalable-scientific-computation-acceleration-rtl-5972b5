// tb_zfp_fwd_cast: drives random 4x4 blocks of doubles (mixed signs, wide
// exponent range, zero blocks) and compares emax, the zero flag and the 16
// integers with a real-arithmetic reference. Checks the one-cycle latency.
module tb_zfp_fwd_cast;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid;
  blk_t in_data;
  zblk_t out_blk;
  zfp_fwd_cast dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                    .out_valid, .out_ready(1'b1), .out_blk);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64a_t d;
    i64a_t r;
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      real sc;
      int  ex;
      ex = $urandom_range(0, 80);
      ex = ex - 40;
      sc = 2.0 ** ex;
      d = make_block(sc, t % 3);
      if (t % 7 == 5) d[3] = $realtobits(sc * 1.0e-9);   // wide spread
      for (int i = 0; i < 16; i++) in_data[i] = d[i];
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no output after 1 cycle"); end
      r = ref_cast(d);
      checks++;
      if (out_blk.emax != 11'(ref_emax(d)) || out_blk.zero != (ref_emax(d) == 0)) begin
        failures++; $display("emax mismatch %0d %0d", out_blk.emax, ref_emax(d));
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (out_blk.v[i] != r[i]) begin
          failures++;
          if (failures < 10) $display("t%0d v%0d got %h exp %h", t, i, out_blk.v[i], r[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
