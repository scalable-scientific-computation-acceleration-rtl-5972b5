// heat3d_core: 7-point 3D heat dissipation stencil over one plane.
//
// To update plane z the core reads planes z-1, z and z+1 in parallel, each
// as a raster-order stream of 256-bit elements (four doubles along x, NX/4
// elements per row, NY rows). Each plane has two row buffers used as a
// circular pair, holding its two most recent rows. When element c of row r
// arrives on all three streams, the core has everything for element c of
// row r-1 of plane z: the centre and its x neighbours (same row buffer,
// elements c-1..c+1), the rows above (buffer) and below (input), and the
// same cell of planes z-1 and z+1 (their buffers). After the last input row
// the core emits the last output row from its buffer. Each cell becomes
//   new = COEF * (((xm + xp) + (ym + yp)) + ((zm + zp) + c))
// computed by a pipeline of three adder levels and one multiplier level
// (four lanes, 24 adders and 4 multipliers); cells on the x or y edge of
// the plane are copied unchanged.
//
// Interface: in_valid/in_ready with in_data[0..2] = planes z-1, z, z+1
// (taken together); coef is the double-precision weight; out_* is the
// updated plane z in the same raster order. Rate: one element per cycle in
// and out; latency 5 cycles; a plane takes NX/4*NY input cycles plus NX/4
// cycles for the last row.
//
// The row buffers, the three parallel input planes, the per-cycle window of
// nine neighbouring row elements and the 4-double datapath follow the
// document. The update formula (seven points times one weight, seven
// floating-point operations per cell), the edge rule and NX, NY are this
// design's own choices; the first and last planes are left to the caller.
module heat3d_core #(
  parameter int unsigned NX = 1024,
  parameter int unsigned NY = 1024,
  localparam int unsigned NE = NX / 4,
  localparam int unsigned CA = $clog2(NE),
  localparam int unsigned RA = $clog2(NY)
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [63:0]           coef,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [2:0][3:0][63:0] in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [3:0][63:0]      out_data,
  output logic                  plane_done
);
  typedef logic [3:0][63:0] elem_t;

  elem_t rowbuf [3][2][NE];
  logic [CA-1:0] col_q;
  logic [RA-1:0] row_q;
  logic          tail_q;

  // Pipeline: stage 0 operands, 1-3 adder levels, 4 multiplier.
  logic [4:0]      v_q;
  logic            adv;
  assign adv       = !v_q[4] || out_ready;
  assign in_ready  = adv && !tail_q;
  assign out_valid = v_q[4];

  logic take, emit;
  assign take = in_valid && in_ready;
  assign emit = take ? (row_q != '0) : (tail_q && adv);

  // Output row and the buffers holding its neighbourhood.
  logic          cb, ab;   // buffer of the centre row, of the row above
  elem_t         cen, lft, rgt, up, dn, lo, hi;
  logic [3:0]    edge_l;
  always_comb begin
    cb  = tail_q ? row_q[0] : ~row_q[0];
    ab  = ~cb;
    cen = rowbuf[1][cb][col_q];
    lft = (col_q != '0) ? rowbuf[1][cb][col_q - 1'b1] : '0;
    rgt = (col_q != CA'(NE - 1)) ? rowbuf[1][cb][col_q + 1'b1] : '0;
    up  = rowbuf[1][ab][col_q];
    dn  = in_data[1];
    lo  = rowbuf[0][cb][col_q];
    hi  = rowbuf[2][cb][col_q];
    for (int l = 0; l < 4; l++) begin
      // Output row is row_q-1 (row_q in the tail); edges are copied.
      edge_l[l] = tail_q || (row_q == RA'(1)) ||
                  (col_q == '0 && l == 0) || (col_q == CA'(NE - 1) && l == 3);
    end
  end

  elem_t s0_c, s0_xm, s0_xp, s0_ym, s0_yp, s0_zm, s0_zp;
  logic [3:0] s0_e, s1_e, s2_e, s3_e;
  elem_t s1_a, s1_b, s1_z, s1_c, s2_a, s2_b, s2_c, s3_s, s3_c;
  elem_t a_xy, a_ym, a_zz, a_ab, a_zc, a_all, m_out;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    fp64_add u_x  (.a(s0_xm[l]), .b(s0_xp[l]), .y(a_xy[l]));
    fp64_add u_y  (.a(s0_ym[l]), .b(s0_yp[l]), .y(a_ym[l]));
    fp64_add u_z  (.a(s0_zm[l]), .b(s0_zp[l]), .y(a_zz[l]));
    fp64_add u_ab (.a(s1_a[l]),  .b(s1_b[l]),  .y(a_ab[l]));
    fp64_add u_zc (.a(s1_z[l]),  .b(s1_c[l]),  .y(a_zc[l]));
    fp64_add u_s  (.a(s2_a[l]),  .b(s2_b[l]),  .y(a_all[l]));
    fp64_mul u_m  (.a(s3_s[l]),  .b(coef),     .y(m_out[l]));
  end

  always_ff @(posedge clk) begin
    if (take) begin
      rowbuf[0][row_q[0]][col_q] <= in_data[0];
      rowbuf[1][row_q[0]][col_q] <= in_data[1];
      rowbuf[2][row_q[0]][col_q] <= in_data[2];
    end
    if (adv) begin
      for (int l = 0; l < 4; l++) begin
        s0_c[l]  <= cen[l];
        s0_xm[l] <= (l > 0) ? cen[l-1] : lft[3];
        s0_xp[l] <= (l < 3) ? cen[l+1] : rgt[0];
        s0_ym[l] <= up[l];
        s0_yp[l] <= dn[l];
        s0_zm[l] <= lo[l];
        s0_zp[l] <= hi[l];
      end
      s0_e <= edge_l;
      s1_a <= a_xy; s1_b <= a_ym; s1_z <= a_zz; s1_c <= s0_c; s1_e <= s0_e;
      s2_a <= a_ab; s2_b <= a_zc; s2_c <= s1_c; s2_e <= s1_e;
      s3_s <= a_all; s3_c <= s2_c; s3_e <= s2_e;
      for (int l = 0; l < 4; l++) out_data[l] <= s3_e[l] ? s3_c[l] : m_out[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q        <= '0;
      col_q      <= '0;
      row_q      <= '0;
      tail_q     <= 1'b0;
      plane_done <= 1'b0;
    end else begin
      plane_done <= 1'b0;
      if (adv) v_q <= {v_q[3:0], emit};
      if (take || (tail_q && adv)) begin
        col_q <= (col_q == CA'(NE - 1)) ? '0 : col_q + 1'b1;
        if (col_q == CA'(NE - 1)) begin
          if (tail_q) begin
            tail_q     <= 1'b0;
            row_q      <= '0;
            plane_done <= 1'b1;
          end else if (row_q == RA'(NY - 1)) begin
            tail_q <= 1'b1;
          end else begin
            row_q <= row_q + 1'b1;
          end
        end
      end
    end
  end
endmodule
