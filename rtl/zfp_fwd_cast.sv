// zfp_fwd_cast: block-floating-point conversion of one 4x4 block of doubles.
//
// The largest biased exponent of the 16 values becomes the block exponent
// emax, and every value is expressed relative to it as a 64-bit two's
// complement integer, value * 2^(62 - e), e being the frexp exponent of the
// largest value, truncated toward zero (as the reference ZFP does with its
// ldexp-and-cast). Zero and subnormal inputs give 0; a block with no normal
// value is flagged zero. Infinities and NaNs are not supported.
//
// Interface: valid/ready in and out; one register stage, one block per cycle.
module zfp_fwd_cast
  import zfp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  blk_t   in_data,     // 16 IEEE-754 doubles
  output logic   out_valid,
  input  logic   out_ready,
  output zblk_t  out_blk      // emax, zero flag and 16 signed integers
);
  logic [EMAX_W-1:0] emax_c;
  zblk_t             res;

  always_comb begin
    emax_c = '0;
    for (int i = 0; i < NVAL; i++)
      if (in_data[i][62:52] > emax_c) emax_c = in_data[i][62:52];
    res.zero = (emax_c == 0);
    res.emax = emax_c;
    for (int i = 0; i < NVAL; i++) begin
      logic [63:0] mant, mag;
      int          sh;
      mant = {11'd0, 1'b1, in_data[i][51:0]};
      sh   = int'(in_data[i][62:52]) - int'(emax_c) + 9;
      if (in_data[i][62:52] == 0)  mag = '0;
      else if (sh >= 0)            mag = mant << sh;
      else if (sh > -64)           mag = mant >> (-sh);
      else                         mag = '0;
      res.v[i] = in_data[i][63] ? -mag : mag;
    end
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
