// tb_ref_pkg: reference models shared by the testbenches.
//
// semiglobal() is the textbook dynamic-programming edit distance with a
// free start in the text: col[j] is the smallest edit distance between the
// whole read and any text substring ending at text position j. It is the
// independent reference for the bit-vector verification hardware.
// qgram_val() packs q nucleotides, first nucleotide most significant.
package tb_ref_pkg;

  typedef logic [1:0] nt_q_t[$];
  typedef int         int_q_t[$];

  function automatic int_q_t semiglobal(nt_q_t rd, nt_q_t txt);
    int m = rd.size();
    int prev[$];
    int cur[$];
    int_q_t col;
    for (int i = 0; i <= m; i++) prev.push_back(i);   // column before the text
    for (int j = 0; j < txt.size(); j++) begin
      cur = {};
      cur.push_back(0);                               // free start
      for (int i = 1; i <= m; i++) begin
        int best = prev[i-1] + ((rd[i-1] == txt[j]) ? 0 : 1);
        if (prev[i] + 1 < best)  best = prev[i] + 1;
        if (cur[i-1] + 1 < best) best = cur[i-1] + 1;
        cur.push_back(best);
      end
      col.push_back(cur[m]);
      prev = cur;
    end
    return col;
  endfunction

  function automatic longint unsigned qgram_val(nt_q_t s, int start, int q);
    longint unsigned v = 0;
    for (int k = 0; k < q; k++) v = (v << 2) | longint'(s[start + k]);
    return v;
  endfunction

  // Random sequence of n nucleotides.
  function automatic nt_q_t rand_seq(int n);
    nt_q_t s;
    for (int i = 0; i < n; i++) s.push_back(2'($urandom));
    return s;
  endfunction

  // Copy of s with `edits` random substitutions, insertions or deletions,
  // trimmed or padded back to the same length.
  function automatic nt_q_t mutate(nt_q_t s, int edits);
    nt_q_t r = s;
    int n = s.size();
    for (int e = 0; e < edits; e++) begin
      int pos = 1 + ($urandom % (n - 2));
      case ($urandom % 3)
        0: r[pos] = r[pos] + 2'd1;
        1: r.insert(pos, 2'($urandom));
        default: r.delete(pos);
      endcase
    end
    while (r.size() > n) void'(r.pop_back());
    while (r.size() < n) r.push_back(2'($urandom));
    return r;
  endfunction

endpackage
