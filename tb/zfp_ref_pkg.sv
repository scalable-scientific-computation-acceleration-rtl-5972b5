// zfp_ref_pkg: software reference of the ZFP-V2 coding steps, written
// independently of the RTL (real arithmetic for the conversions, a
// bit-serial writer for the coder), plus stimulus helpers.
package zfp_ref_pkg;
  typedef longint      i64a_t [16];
  typedef bit [63:0]   u64a_t [16];

  // Smooth 4x4 field with some noise; scale sets the exponent range.
  function automatic u64a_t make_block(input real scale, input int kind);
    u64a_t b;
    for (int i = 0; i < 16; i++) begin
      real r;
      r = scale * (1.0 + 0.01 * (i % 4) + 0.02 * (i / 4))
          + scale * 1.0e-6 * real'($urandom_range(0, 1000));
      if (kind == 1 && (i % 3 == 0)) r = -r;
      if (kind == 2) r = 0.0;
      b[i] = $realtobits(r);
    end
    return b;
  endfunction

  function automatic int ref_emax(input u64a_t d);
    int e;
    e = 0;
    for (int i = 0; i < 16; i++) if (int'(d[i][62:52]) > e) e = int'(d[i][62:52]);
    return e;
  endfunction

  function automatic real trunc(input real r);
    return (r >= 0.0) ? $floor(r) : $ceil(r);
  endfunction

  function automatic i64a_t ref_cast(input u64a_t d);
    i64a_t o;
    int e;
    e = ref_emax(d) - 1022;
    for (int i = 0; i < 16; i++) begin
      real r;
      r = $bitstoreal(d[i]);
      if (d[i][62:52] == 0) o[i] = 0;
      else o[i] = longint'(trunc(r * (2.0 ** (62 - e))));
    end
    return o;
  endfunction

  function automatic bit [63:0] ref_icast(input longint v, input int emax_b);
    real r;
    if (v == 0) return 64'd0;
    r = real'(v) * (2.0 ** (emax_b - 1022 - 62));
    return $realtobits(r);
  endfunction

  function automatic void lift(ref longint p[16], input int s, input int st);
    longint x, y, z, w;
    x = p[s]; y = p[s+st]; z = p[s+2*st]; w = p[s+3*st];
    x += w; x >>>= 1; w -= x;
    z += y; z >>>= 1; y -= z;
    x += z; x >>>= 1; z -= x;
    w += y; w >>>= 1; y -= w;
    w += y >>> 1; y -= w >>> 1;
    p[s] = x; p[s+st] = y; p[s+2*st] = z; p[s+3*st] = w;
  endfunction

  function automatic void ilift(ref longint p[16], input int s, input int st);
    longint x, y, z, w;
    x = p[s]; y = p[s+st]; z = p[s+2*st]; w = p[s+3*st];
    y += w >>> 1; w -= y >>> 1;
    y += w; w <<<= 1; w -= y;
    z += x; x <<<= 1; x -= z;
    y += z; z <<<= 1; z -= y;
    w += x; x <<<= 1; x -= w;
    p[s] = x; p[s+st] = y; p[s+2*st] = z; p[s+3*st] = w;
  endfunction

  // Sequency order table of the 2D block: (x,y) pairs by increasing x+y.
  localparam int PERM [16] = '{0, 1, 4, 5, 2, 8, 6, 9, 3, 12, 10, 7, 13, 11, 14, 15};

  function automatic u64a_t ref_fxform(input i64a_t in);
    longint p [16];
    u64a_t  o;
    p = in;
    for (int y = 0; y < 4; y++) lift(p, 4*y, 1);
    for (int x = 0; x < 4; x++) lift(p, x, 4);
    for (int i = 0; i < 16; i++)
      o[i] = (p[PERM[i]] + 64'haaaaaaaaaaaaaaaa) ^ 64'haaaaaaaaaaaaaaaa;
    return o;
  endfunction

  function automatic i64a_t ref_ixform(input u64a_t in);
    longint p [16];
    for (int i = 0; i < 16; i++)
      p[PERM[i]] = longint'((in[i] ^ 64'haaaaaaaaaaaaaaaa) - 64'haaaaaaaaaaaaaaaa);
    for (int x = 0; x < 4; x++) ilift(p, x, 4);
    for (int y = 0; y < 4; y++) ilift(p, 4*y, 1);
    return p;
  endfunction

  function automatic int ref_np(input int emax_b, input int minexp);
    int p;
    p = emax_b - 1022 - minexp + 6;
    if (p < 0) p = 0;
    if (p > 64) p = 64;
    return p;
  endfunction

  // Bit-serial ZFP-V2 block writer following the header table.
  function automatic void ref_encode(ref bit q[$], input bit zero, input int emax_b,
                                     input u64a_t u, input int minexp);
    int np;
    int nb [64];
    bit [15:0] pl [64];
    if (zero) begin
      q.push_back(1'b0);
      return;
    end
    q.push_back(1'b1);
    for (int b = 0; b < 11; b++) q.push_back(emax_b[b]);
    np = ref_np(emax_b, minexp);
    for (int j = 0; j < np; j++) begin
      for (int i = 0; i < 16; i++) pl[j][i] = u[i][63-j];
      q.push_back(pl[j] > 1);
    end
    for (int j = 0; j < np; j++) begin
      int m;
      m = 0;
      for (int i = 0; i < 16; i++) if (pl[j][i]) m = i;
      if (m == 0)      nb[j] = 1;
      else if (m == 1) begin q.push_back(0); q.push_back(0); nb[j] = 2;  end
      else if (m < 4)  begin q.push_back(0); q.push_back(1); nb[j] = 4;  end
      else if (m < 8)  begin q.push_back(1); q.push_back(0); nb[j] = 8;  end
      else             begin q.push_back(1); q.push_back(1); nb[j] = 16; end
    end
    for (int j = 0; j < np; j++)
      for (int b = 0; b < nb[j]; b++) q.push_back(pl[j][b]);
  endfunction

  // What decoding keeps of a block: the coded planes only.
  function automatic u64a_t ref_truncate(input u64a_t u, input int np);
    u64a_t o;
    bit [63:0] m;
    m = (np == 0) ? 64'd0 : ~((64'd1 << (64 - np)) - 64'd1);
    if (np == 64) m = '1;
    for (int i = 0; i < 16; i++) o[i] = u[i] & m;
    return o;
  endfunction

  // Chunk builder: appends a block's bits to the current chunk, closing it
  // first (marker + zero fill) when the block and a marker would not fit.
  function automatic void ref_close(ref bit cur[$], ref bit out[$], input int cbits);
    for (int b = 0; b < 12; b++) cur.push_back(1'b1);
    while (cur.size() < cbits) cur.push_back(1'b0);
    foreach (cur[i]) out.push_back(cur[i]);
    cur.delete();
  endfunction

  function automatic void ref_add(ref bit cur[$], ref bit out[$], input bit blk[$], input int cbits);
    if (cur.size() + blk.size() + 12 > cbits) ref_close(cur, out, cbits);
    foreach (blk[i]) cur.push_back(blk[i]);
  endfunction

  // Random coefficient block whose planes exercise every header code.
  function automatic u64a_t rand_coeffs(input int style);
    u64a_t u;
    for (int i = 0; i < 16; i++) begin
      int lz;
      lz = (style == 0) ? i * 4 : $urandom_range(0, 63);
      u[i] = {$urandom, $urandom} >> lz;
      if (style == 2 && i > 1) u[i] = 0;
    end
    return u;
  endfunction
endpackage
