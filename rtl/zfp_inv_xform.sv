// zfp_inv_xform: inverse of zfp_fwd_xform.
//
// Maps the decoded negabinary coefficients back to two's complement, undoes
// the sequency ordering and applies the ZFP inverse lifting transform along
// y (columns) and then x (rows).
//
// Interface: valid/ready; one register stage, one block per cycle.
module zfp_inv_xform
  import zfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  zblk_t  in_blk,      // unsigned coefficients in sequency order
  output logic   out_valid,
  input  logic   out_ready,
  output zblk_t  out_blk      // signed block-floating-point integers
);
  zblk_t res;

  always_comb begin
    blk_t  t;
    vec4_t r;
    t = '0;
    for (int i = 0; i < NVAL; i++) t[perm2(i)] = uint2int(in_blk.v[i]);
    for (int x = 0; x < 4; x++) begin
      r = inv_lift({t[x+12], t[x+8], t[x+4], t[x]});
      for (int y = 0; y < 4; y++) t[4*y+x] = r[y];
    end
    for (int y = 0; y < 4; y++) begin
      r = inv_lift({t[4*y+3], t[4*y+2], t[4*y+1], t[4*y]});
      for (int x = 0; x < 4; x++) t[4*y+x] = r[x];
    end
    res.zero = in_blk.zero;
    res.emax = in_blk.emax;
    res.v    = t;
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
