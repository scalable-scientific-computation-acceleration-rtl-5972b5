// zfp_pkg: types, constants and pure functions shared by the ZFP-V2 (2D,
// double precision) compressor and decompressor.
//
// A 2D block holds 16 doubles (4x4, index x + 4*y). After block-floating-
// point conversion each value is a 64-bit signed integer; the lifting
// transform decorrelates them, sequency ordering sorts them roughly by
// magnitude, and negabinary conversion turns them into unsigned words whose
// bit planes are coded from plane 63 downwards. The lifting steps, the
// sequency permutation and the negabinary mapping are those of the
// reference ZFP 0.5.x software, which the ZFP-V algorithm keeps unchanged;
// only the embedded coder differs.
package zfp_pkg;

  localparam int unsigned NVAL      = 16;    // values per 2D block
  localparam int unsigned EMAX_W    = 11;    // biased exponent field width
  localparam int unsigned FRAG_W    = 512;   // widest encoder fragment
  // End-of-chunk marker: a non-zero-block flag followed by an all-ones
  // exponent, which no finite block can carry.
  localparam logic [11:0] EOC_MARK  = 12'hFFF;
  localparam int unsigned EOC_BITS  = 12;

  typedef logic [NVAL-1:0][63:0] blk_t;     // 16 x 64-bit words

  // Encoder -> packer fragment of a compressed block (LSB is sent first).
  typedef struct packed {
    logic [FRAG_W-1:0] bits;
    logic [9:0]        nbits;    // 0..512 valid bits
    logic              first;    // first fragment of a block
    logic              last;     // last fragment of a block
    logic [11:0]       blk_len;  // whole block length in bits (on first)
  } frag_t;

  // Coefficient block with its exponent, between the pipeline stages.
  typedef struct packed {
    logic              zero;     // all values zero
    logic [EMAX_W-1:0] emax;     // largest biased exponent in the block
    blk_t              v;
  } zblk_t;

  localparam logic [63:0] NBMASK = 64'haaaa_aaaa_aaaa_aaaa;

  function automatic logic [63:0] int2uint(input logic [63:0] x);
    return (x + NBMASK) ^ NBMASK;
  endfunction

  function automatic logic [63:0] uint2int(input logic [63:0] u);
    return (u ^ NBMASK) - NBMASK;
  endfunction

  // Sequency order: position i of the coded block holds value perm(i).
  function automatic int unsigned perm2(input int unsigned i);
    case (i)
      0: return 0;   1: return 1;   2: return 4;   3: return 5;
      4: return 2;   5: return 8;   6: return 6;   7: return 9;
      8: return 3;   9: return 12; 10: return 10; 11: return 7;
      12: return 13; 13: return 11; 14: return 14; default: return 15;
    endcase
  endfunction

  // Number of bit planes coded for a block (fixed-accuracy mode):
  // emax - minexp + 2*(dims+1), clamped to 0..64. emax is the unbiased
  // frexp exponent of the largest value, minexp = floor(log2(tolerance)).
  function automatic logic [6:0] nplanes(input logic [EMAX_W-1:0] emax_b,
                                         input logic signed [15:0] minexp);
    int p;
    p = int'(emax_b) - 1022 - int'(minexp) + 6;
    if (p < 0) return 7'd0;
    if (p > 64) return 7'd64;
    return 7'(p);
  endfunction

  // Forward and inverse 4-point lifting steps of the ZFP transform.
  typedef logic signed [3:0][63:0] vec4_t;

  function automatic vec4_t fwd_lift(input vec4_t a);
    logic signed [63:0] x, y, z, w;
    x = a[0]; y = a[1]; z = a[2]; w = a[3];
    x += w; x >>>= 1; w -= x;
    z += y; z >>>= 1; y -= z;
    x += z; x >>>= 1; z -= x;
    w += y; w >>>= 1; y -= w;
    w += y >>> 1; y -= w >>> 1;
    return {w, z, y, x};
  endfunction

  function automatic vec4_t inv_lift(input vec4_t a);
    logic signed [63:0] x, y, z, w;
    x = a[0]; y = a[1]; z = a[2]; w = a[3];
    y += w >>> 1; w -= y >>> 1;
    y += w; w <<<= 1; w -= y;
    z += x; x <<<= 1; x -= z;
    y += z; z <<<= 1; z -= y;
    w += x; x <<<= 1; x -= w;
    return {w, z, y, x};
  endfunction

  // Variable-length plane header (level-1 bit, level-2 code, data bits).
  // MSB 0 (value 0 or 1): "0" + 1 bit; MSB 1: "1"+00 + 2 bits;
  // MSB 2-3: "1"+01 + 4; MSB 4-7: "1"+10 + 8; MSB 8-15: "1"+11 + 16.
  function automatic logic [1:0] plane_code(input logic [15:0] p);
    if (p[15:8] != 0) return 2'd3;
    if (p[7:4]  != 0) return 2'd2;
    if (p[3:2]  != 0) return 2'd1;
    return 2'd0;
  endfunction

  function automatic logic [4:0] plane_dlen(input logic l1, input logic [1:0] code);
    return l1 ? (5'd2 << code) : 5'd1;
  endfunction

endpackage
