// fp64_add: combinational IEEE-754 double-precision adder, y = a + b.
//
// The operand of larger magnitude is kept, the other is aligned to it with
// three extra bits (guard, round, sticky), the significands are added or
// subtracted, the result is normalised (one place right after a carry, or
// left by the count of leading zeros after a cancellation) and rounded to
// nearest, ties to even. Subnormal inputs are read as zero and results
// below the normal range are flushed to zero; results above it become
// infinity. NaN and infinity inputs are not treated specially (the stencil
// data never holds them). The stencil core registers the output.
// The document names double-precision stencil arithmetic but not its
// units; everything here is this design's own choice.
module fp64_add (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  always_comb begin
    logic        sa, sb, sx, sy;
    logic [10:0] ea, eb, ex, ey;
    logic [52:0] ma, mb;
    logic [55:0] mx, my, sh;
    logic [56:0] s;
    logic [11:0] d;
    logic        sticky, rup;
    logic signed [13:0] e;
    int          lz;
    logic [53:0] r;

    sa = a[63]; ea = a[62:52]; ma = (ea != 0) ? {1'b1, a[51:0]} : 53'd0;
    sb = b[63]; eb = b[62:52]; mb = (eb != 0) ? {1'b1, b[51:0]} : 53'd0;
    if (ea == 0) ea = 11'd0;
    if (eb == 0) eb = 11'd0;
    // x is the operand of larger magnitude.
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = {ma, 3'b000}; sy = sb; ey = eb; my = {mb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {mb, 3'b000}; sy = sa; ey = ea; my = {ma, 3'b000};
    end
    d = {1'b0, ex} - {1'b0, ey};
    if (d > 12'd56) begin
      sh = 56'd0;
      sticky = (my != 0);
    end else begin
      sh = my >> d;
      sticky = ((sh << d) != my);
    end
    sh[0] = sh[0] | sticky;

    e = 14'(ex);
    if (sx == sy) s = {1'b0, mx} + {1'b0, sh};
    else          s = {1'b0, mx} - {1'b0, sh};

    y = '0;
    lz = 0;
    rup = 1'b0;
    r = '0;
    if (mx == 0) begin
      y = {sa & sb, 63'd0};          // both operands zero
    end else if (s == 0) begin
      y = 64'd0;                     // exact cancellation gives +0
    end else begin
      if (s[56]) begin
        s = {1'b0, s[56:2], s[1] | s[0]};
        e = e + 1;
      end else begin
        for (int i = 55; i >= 0; i--) if (s[i] && lz == 0) lz = 56 - i;
        lz = lz - 1;  // leading zeros above bit 55
        s = s << lz;
        e = e - 14'(lz);
      end
      // s[55] is the hidden one, s[54:3] the fraction, s[2:0] guard bits.
      rup = s[2] && (s[1] || s[0] || s[3]);
      r = {1'b0, s[55:3]} + 54'(rup);
      if (r[53]) begin
        r = r >> 1;
        e = e + 1;
      end
      if (e <= 0)          y = {sx, 63'd0};
      else if (e >= 2047)  y = {sx, 11'h7FF, 52'd0};
      else                 y = {sx, 11'(e), r[51:0]};
    end
  end
endmodule
