// fp64_mul: combinational IEEE-754 double-precision multiplier, y = a * b.
//
// The 53-bit significands are multiplied into a 106-bit product, which is
// normalised by at most one place and rounded to nearest, ties to even,
// using a guard bit and a sticky bit. Subnormal inputs are read as zero and
// results below the normal range are flushed to zero; results above it
// become infinity. NaN and infinity inputs are not treated specially. The
// stencil core registers the output. The document names double-precision
// stencil arithmetic but not its units; everything here is this design's
// own choice.
module fp64_mul (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  always_comb begin
    logic        s, g, st;
    logic [10:0] ea, eb;
    logic [105:0] p;
    logic [52:0] m;
    logic [53:0] r;
    logic signed [13:0] e;

    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    p  = 106'({1'b1, a[51:0]}) * 106'({1'b1, b[51:0]});
    e  = 14'(ea) + 14'(eb) - 14'sd1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = (p[51:0] != 0);
      e  = e + 1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = (p[50:0] != 0);
    end
    r = {1'b0, m} + 54'(g && (st || m[0]));
    if (r[53]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (ea == 0 || eb == 0 || e <= 0) y = {s, 63'd0};
    else if (e >= 2047)              y = {s, 11'h7FF, 52'd0};
    else                             y = {s, 11'(e), r[51:0]};
  end
endmodule
