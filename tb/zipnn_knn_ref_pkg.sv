// zipnn_knn_ref_pkg: software model of the k-NN scoring used by the
// testbenches: random bag-of-words documents and queries, and the score
//   floor(dot^2 * 2^8 / sum(count^2)), saturated to 32 bits.
package zipnn_knn_ref_pkg;
  typedef int unsigned uq_t[$];

  // Sorted list of n distinct words drawn from 0..range-1.
  function automatic uq_t rand_words(input int n, input int range);
    uq_t w;
    bit used [int];
    while (w.size() < n) begin
      int unsigned x;
      x = $urandom_range(0, range - 1);
      if (!used.exists(x)) begin used[x] = 1; w.push_back(x); end
    end
    w.sort();
    return w;
  endfunction

  function automatic int unsigned ref_score(input uq_t dw, input uq_t dc,
                                            input uq_t qw, input uq_t qf);
    longint unsigned dot, norm, num, q;
    dot = 0; norm = 0;
    foreach (dw[i]) begin
      norm += longint'(dc[i]) * dc[i];
      foreach (qw[j]) if (qw[j] == dw[i]) dot += longint'(dc[i]) * qf[j];
    end
    if (norm == 0) return 0;
    num = (dot * dot) << 8;
    q = num / norm;
    return (q > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : 32'(q);
  endfunction
endpackage
