// sw_tb_pkg: reference model and record packing used by the testbenches.
//
// sw_matrix() fills the full Smith-Waterman score matrix H (with the zero
// row and column, size (M+1) x (R+1), row-major) by the textbook
// recurrence with a linear gap penalty, independently of the RTL. The best
// score is the maximum over H; a reported location (i, j), 0-based, is
// correct when H(i+1, j+1) equals that maximum. pack_pair() builds a pair
// record in the global-memory layout the RTL reads.
package sw_tb_pkg;
  import sw_pkg::*;

  typedef byte unsigned seq_t [];

  function automatic void sw_matrix(input seq_t q, input seq_t r,
                                    input int match, input int mismatch, input int gap,
                                    output int h [], output int best);
    int m, n;
    m = q.size();
    n = r.size();
    h = new[(m + 1) * (n + 1)];
    best = 0;
    foreach (h[k]) h[k] = 0;
    for (int i = 1; i <= m; i++) begin
      for (int j = 1; j <= n; j++) begin
        int v, d, up, lf;
        d  = h[(i - 1) * (n + 1) + (j - 1)] + ((q[i-1] == r[j-1]) ? match : -mismatch);
        up = h[(i - 1) * (n + 1) + j] - gap;
        lf = h[i * (n + 1) + (j - 1)] - gap;
        v = 0;
        if (d > v) v = d;
        if (up > v) v = up;
        if (lf > v) v = lf;
        h[i * (n + 1) + j] = v;
        if (v > best) best = v;
      end
    end
  endfunction

  function automatic int h_at(input int h [], input int n, input int i, input int j);
    return h[i * (n + 1) + j];
  endfunction

  // One record: header, MAX_S/32 sample words, MAX_R/32 reference words.
  function automatic void pack_pair(input seq_t q, input seq_t r,
                                    input int s_words, input int r_words,
                                    input int hdr_slen, input int hdr_rlen,
                                    output word_t rec []);
    rec = new[1 + s_words + r_words];
    foreach (rec[k]) rec[k] = '0;
    rec[0] = word_t'({32'd0, 16'(hdr_rlen), 16'(hdr_slen)});
    foreach (q[k]) if (k < s_words * BASES_PER_WORD)
      rec[1 + k / BASES_PER_WORD][(k % BASES_PER_WORD) * 2 +: 2] = 2'(q[k]);
    foreach (r[k]) if (k < r_words * BASES_PER_WORD)
      rec[1 + s_words + k / BASES_PER_WORD][(k % BASES_PER_WORD) * 2 +: 2] = 2'(r[k]);
  endfunction

  function automatic seq_t rand_seq(input int len);
    seq_t s;
    s = new[len];
    foreach (s[k]) s[k] = 8'($urandom_range(0, 3));
    return s;
  endfunction

  // A sequence related to src: copied with random substitutions and gaps,
  // so that alignments have non-trivial scores.
  function automatic seq_t mutate(input seq_t src, input int len);
    seq_t s;
    int p;
    s = new[len];
    p = $urandom_range(0, (src.size() > 1) ? src.size() / 4 : 0);
    foreach (s[k]) begin
      int c;
      c = $urandom_range(0, 9);
      if (c == 0)      s[k] = 8'($urandom_range(0, 3));
      else if (c == 1) begin s[k] = 8'($urandom_range(0, 3)); p++; end
      else begin
        s[k] = (src.size() > 0) ? src[p % src.size()] : 8'd0;
        p = (c == 2) ? p + 2 : p + 1;
      end
    end
    return s;
  endfunction

endpackage
