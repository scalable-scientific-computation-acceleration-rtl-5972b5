// zfp_fwd_xform: decorrelating transform of a 2D block.
//
// Applies the ZFP forward lifting transform along x (each row) and then
// along y (each column), reorders the 16 coefficients by sequency (x + y)
// and maps them to negabinary so that small magnitudes of either sign have
// leading zero bits. The result is ready for bit-plane coding.
//
// Interface: valid/ready; one register stage, one block per cycle.
module zfp_fwd_xform
  import zfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  zblk_t  in_blk,      // signed block-floating-point integers
  output logic   out_valid,
  input  logic   out_ready,
  output zblk_t  out_blk      // unsigned coefficients in sequency order
);
  zblk_t res;

  always_comb begin
    blk_t  t;
    vec4_t r;
    t = in_blk.v;
    for (int y = 0; y < 4; y++) begin
      r = fwd_lift({t[4*y+3], t[4*y+2], t[4*y+1], t[4*y]});
      for (int x = 0; x < 4; x++) t[4*y+x] = r[x];
    end
    for (int x = 0; x < 4; x++) begin
      r = fwd_lift({t[x+12], t[x+8], t[x+4], t[x]});
      for (int y = 0; y < 4; y++) t[4*y+x] = r[y];
    end
    res.zero = in_blk.zero;
    res.emax = in_blk.emax;
    for (int i = 0; i < NVAL; i++) res.v[i] = int2uint(t[perm2(i)]);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_blk <= res;
    end
  end
endmodule
