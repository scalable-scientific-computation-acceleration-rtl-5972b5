// tb_zfp_inv_cast: random integer blocks and exponents converted back to
// doubles, compared bit-exactly with the software conversion (int64 to
// double rounding to nearest even, then scaling by a power of two).
module tb_zfp_inv_cast;
  import zfp_pkg::*;
  import zfp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid;
  zblk_t in_blk;
  blk_t  out_data;
  zfp_inv_cast dut (.clk, .rst_n, .in_valid, .in_ready, .in_blk,
                    .out_valid, .out_ready(1'b1), .out_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [16];
    in_valid = 0; in_blk = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin
        a[i] = longint'({$urandom, $urandom}) >>> $urandom_range(0, 62);
        if (i == 5) a[i] = 0;
        in_blk.v[i] = a[i];
      end
      in_blk.emax = 11'($urandom_range(200, 1800));
      in_blk.zero = 0;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no output"); end
      for (int i = 0; i < 16; i++) begin
        bit [63:0] e;
        e = ref_icast(a[i], int'(in_blk.emax));
        checks++;
        if (out_data[i] != e) begin
          failures++;
          if (failures < 10) $display("t%0d v%0d got %h exp %h (%0d)", t, i, out_data[i], e, a[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
