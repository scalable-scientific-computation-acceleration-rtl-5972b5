// zipnn_ref_pkg: software encoders for the ZipNN column formats (delta,
// run-length, Pipelined Group Varint) and small stimulus helpers.
package zipnn_ref_pkg;
  typedef int unsigned uq_t[$];
  typedef byte unsigned bq_t[$];

  function automatic int nbytes(input int unsigned v);
    if (v < 32'h100) return 1;
    if (v < 32'h10000) return 2;
    if (v < 32'h1000000) return 3;
    return 4;
  endfunction

  // Pipelined Group Varint: sections of n header groups (8 values each).
  function automatic bq_t pgv_encode(input uq_t vals, input int n);
    bq_t out;
    int total, nsec;
    total = vals.size();
    nsec = (total + 8 * n - 1) / (8 * n);
    for (int s = 0; s < nsec; s++) begin
      bq_t data;
      for (int g = 0; g < n; g++) begin
        bit [15:0] h;
        h = 0;
        for (int k = 0; k < 8; k++) begin
          int idx, nb;
          int unsigned v;
          idx = s * 8 * n + g * 8 + k;
          v = (idx < total) ? vals[idx] : 0;
          nb = nbytes(v);
          h[2*k +: 2] = 2'(nb - 1);
          for (int b = 0; b < nb; b++) data.push_back(8'(v >> (8 * b)));
        end
        out.push_back(h[7:0]);
        out.push_back(h[15:8]);
      end
      foreach (data[i]) out.push_back(data[i]);
    end
    return out;
  endfunction

  function automatic uq_t delta_encode(input uq_t vals);
    uq_t o;
    int unsigned prev;
    prev = 0;
    foreach (vals[i]) begin o.push_back(vals[i] - prev); prev = vals[i]; end
    return o;
  endfunction

  function automatic uq_t rle_encode(input uq_t vals);
    uq_t o;
    int i;
    i = 0;
    while (i < vals.size()) begin
      int j;
      j = i;
      while (j < vals.size() && vals[j] == vals[i]) j++;
      o.push_back(vals[i]);
      o.push_back(j - i);
      i = j;
    end
    return o;
  endfunction

  // Value with a random byte length.
  function automatic int unsigned rand_val();
    case ($urandom_range(0, 3))
      0: return $urandom_range(0, 255);
      1: return $urandom_range(256, 65535);
      2: return $urandom_range(65536, 32'hFFFFFF);
      default: return $urandom;
    endcase
  endfunction
endpackage
