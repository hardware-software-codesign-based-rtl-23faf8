// ac_tb_pkg: testbench-side software model of the codesign flow.
//
// ac_table plays the role of the processor software: it builds the
// Aho-Corasick automaton of a pattern set (trie, failure links, merged output
// sets) and expands it into the complete next-state table that the hardware
// stores, one row per state, in the row layout of ac_pkg. naive_hits is an
// independent reference: it finds, by direct comparison at every position,
// which patterns end at each symbol of a text. Symbols are letters 'A'.. of a
// string mapped to codes 0..; text symbols are held as int codes so that
// separators (codes >= alpha) can be mixed in.
package ac_tb_pkg;

  typedef int sym_q_t[$];

  function automatic sym_q_t str2sym(string s);
    sym_q_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(int'(s[i]) - 65);
    return q;
  endfunction

  class ac_table;
    int          alpha, npat, maxst, sw;
    int          nstates;
    int          delta[];    // nstates*alpha next-state entries
    longint unsigned outs[]; // output set per state
    bit          overflow;

    function new(int alpha_, int npat_, int maxst_);
      alpha = alpha_; npat = npat_; maxst = maxst_;
      sw = $clog2(maxst_);
    endfunction

    function void build(string pats[$]);
      int fail[];
      int q[$];
      delta = new[maxst * alpha];
      outs  = new[maxst];
      fail  = new[maxst];
      foreach (delta[i]) delta[i] = -1;
      foreach (outs[i])  outs[i] = 0;
      nstates  = 1;
      overflow = 0;
      foreach (pats[p]) begin
        int s;
        s = 0;
        for (int i = 0; i < pats[p].len(); i++) begin
          int c;
          c = int'(pats[p][i]) - 65;
          if (delta[s*alpha + c] < 0) begin
            if (nstates == maxst) begin overflow = 1; return; end
            delta[s*alpha + c] = nstates;
            nstates++;
          end
          s = delta[s*alpha + c];
        end
        outs[s] |= (64'd1 << p);
      end
      for (int c = 0; c < alpha; c++) begin
        if (delta[c] < 0) delta[c] = 0;
        else begin fail[delta[c]] = 0; q.push_back(delta[c]); end
      end
      while (q.size() > 0) begin
        int r;
        r = q.pop_front();
        outs[r] |= outs[fail[r]];
        for (int c = 0; c < alpha; c++) begin
          int u;
          u = delta[r*alpha + c];
          if (u >= 0) begin
            fail[u] = delta[fail[r]*alpha + c];
            q.push_back(u);
          end else begin
            delta[r*alpha + c] = delta[fail[r]*alpha + c];
          end
        end
      end
    endfunction

    // table row of state st, bit 0 = output-cell bit 0
    function logic [2047:0] row(int st);
      logic [2047:0] r;
      r = '0;
      if (st < nstates) begin
        for (int p = 0; p < npat; p++) r[p] = outs[st][p];
        for (int c = 0; c < alpha; c++)
          for (int b = 0; b < sw; b++)
            r[npat + (alpha - 1 - c) * sw + b] = delta[st*alpha + c][b];
      end
      return r;
    endfunction
  endclass

  // bit p of result[i] is set when pattern p ends at text position i
  function automatic void naive_hits(string pats[$], int text[], ref longint unsigned hits[]);
    hits = new[text.size()];
    foreach (text[i]) begin
      hits[i] = 0;
      foreach (pats[p]) begin
        int l;
        bit ok;
        l  = pats[p].len();
        ok = (l > 0) && (i + 1 >= l);
        for (int k = 0; ok && k < l; k++)
          if (text[i - l + 1 + k] != int'(pats[p][k]) - 65) ok = 0;
        if (ok) hits[i] |= (64'd1 << p);
      end
    end
  endfunction

  // random pattern of length len over the first nsym letters
  function automatic string rand_pat(int len, int nsym);
    string s;
    s = "";
    for (int i = 0; i < len; i++) s = {s, string'(byte'(65 + $urandom_range(nsym - 1)))};
    return s;
  endfunction

endpackage
