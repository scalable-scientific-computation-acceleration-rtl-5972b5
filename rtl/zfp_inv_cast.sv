// zfp_inv_cast: inverse block-floating-point conversion.
//
// Each 64-bit integer i of a block with biased exponent emax becomes the
// double i * 2^(e - 62), e = emax - 1022, rounded to nearest even as a C
// integer-to-double conversion would. Results below the normal range are
// flushed to zero; a zero block gives 16 zeros.
//
// Interface: valid/ready; one register stage, one block per cycle.
module zfp_inv_cast
  import zfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  zblk_t  in_blk,
  output logic   out_valid,
  input  logic   out_ready,
  output blk_t   out_data     // 16 IEEE-754 doubles
);
  blk_t res;

  always_comb begin
    for (int i = 0; i < NVAL; i++) begin
      logic [63:0] x, mag, rem;
      logic [52:0] m;
      logic [53:0] mr;
      int          p, be;
      logic        g, s;
      x   = in_blk.v[i];
      mag = x[63] ? -x : x;
      p   = 0;
      for (int b = 0; b < 64; b++) if (mag[b]) p = b;
      g = 1'b0; s = 1'b0; rem = '0;
      if (p > 52) begin
        m   = 53'(mag >> (p - 52));
        g   = mag[p-53];
        rem = mag & ((64'd1 << (p - 53)) - 64'd1);
        s   = (rem != 0);
      end else begin
        m = 53'(mag << (52 - p));
      end
      mr = {1'b0, m} + 54'(g && (s || m[0]));
      be = p + int'(in_blk.emax) - 61;
      if (mr[53]) begin
        mr = mr >> 1;
        be = be + 1;
      end
      if (in_blk.zero || mag == 0 || be <= 0) res[i] = '0;
      else res[i] = {x[63], 11'(be), mr[51:0]};
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= res;
    end
  end
endmodule
