// pasta_tb_pkg: dictionary compiler and reference matcher for the PASTA
// testbenches.
//
// pasta_dict turns a word list into the memory images of the matcher:
//  * the affix segments of the relay: segment r holds, for every word longer
//    than (r-1)*S characters, its characters [(r-1)S, min(len, rS)) keyed by
//    the affix index of the word's previous segment. A word ending in the
//    segment sets the containment-bitmap bit of its length; an affix that is
//    a prefix of another affix with the same key is merged into every such
//    affix and removed. Nodes are sorted by {key, padded affix} and their
//    1-based rank is their affix index. slot() lays the sorted nodes out
//    in-order over the levels of a full tree, filling the rest with the
//    all-ones "never matches" node.
//  * the branches of the tail automaton: one state per prefix, longer than
//    L = R*S characters, of a word longer than L; tail roots are the L-char
//    prefixes and sit at the branch number equal to their affix index. A
//    state with a single chain of at least eight single-child states below it
//    becomes a mode-3 branch (one eight-character path); a state with a
//    single-child chain of 2..7 characters ending in a leaf becomes a mode-3
//    branch whose path is cut short by in_msk; a state whose children all
//    start single-child chains of 4 (2) characters becomes a mode-2 (mode-1)
//    branch; every other state is a mode-0 branch with one label per child. A label reports a match (ma_msk) when a
//    word longer than L is a suffix of the state it leads to. The failure
//    branch is the branch holding the longest proper suffix state (depth at
//    least L), with r = that state's offset inside its branch; 0 when there
//    is none.
// Reference results are computed by brute-force search of the text.
//
// Source: the segment, bitmap, merge and affix-index rules and the Aho-
// Corasick failure function follow the PASTA design; branch packing (modes 0
// and 3 only) and tail-root branch numbering are own choices of this test
// compiler.
package pasta_tb_pkg;

  typedef struct {
    int        dw;
    string     aff;
    bit [7:0]  bm;
  } ent_t;

  class pasta_dict;
    int    S, R, H;
    string words[$];
    ent_t  nodes[int][$];          // per stage (1..R), sorted
    int    dmap[string];           // "r|dw|aff" -> affix index
    int    rootd[string];          // L-char prefix -> tail-root affix index
    int    nroots;
    // tail automaton
    int    sid[string];            // state string -> state id
    string sstr[$];
    int    s_br[$], s_off[$];      // branch holding the state, offset in it
    bit    wordset[string];
    logic [127:0] br[int];         // branch number -> branch image
    int    nbranches;
    int    n_mode3, n_mode0, n_roll, n_mode12;

    function new(int s, int r, int h);
      S = s; R = r; H = h;
    endfunction

    static function string key(int r, int dw, string a);
      return $sformatf("%0d|%0d|%s", r, dw, a);
    endfunction

    static function bit less(ent_t a, ent_t b);
      if (a.dw != b.dw) return a.dw < b.dw;
      return a.aff < b.aff;
    endfunction

    function void build_pasr();
      int wd[$];
      foreach (words[w]) wd.push_back(0);
      for (int r = 1; r <= R; r++) begin
        ent_t e[$];
        bit   del[$];
        ent_t srt[$];
        foreach (words[w]) begin
          int    L, hi, f;
          string a;
          L = words[w].len();
          if (L <= (r-1)*S) continue;
          hi = (L < r*S) ? L : r*S;
          a  = words[w].substr((r-1)*S, hi-1);
          f  = -1;
          foreach (e[i]) if (e[i].dw == wd[w] && e[i].aff == a) f = i;
          if (f < 0) begin
            ent_t n;
            n.dw = wd[w]; n.aff = a; n.bm = '0;
            e.push_back(n);
            f = e.size() - 1;
          end
          if (L <= r*S) e[f].bm[a.len()-1] = 1'b1;
        end
        foreach (e[i]) del.push_back(1'b0);
        foreach (e[y]) foreach (e[x]) begin
          if (x != y && e[x].dw == e[y].dw && e[y].aff.len() < e[x].aff.len() &&
              e[x].aff.substr(0, e[y].aff.len()-1) == e[y].aff) begin
            e[x].bm |= e[y].bm;
            del[y] = 1'b1;
          end
        end
        foreach (e[i]) if (!del[i]) srt.push_back(e[i]);
        // insertion sort
        for (int i = 1; i < srt.size(); i++) begin
          ent_t t;
          int   j;
          t = srt[i];
          j = i - 1;
          while (j >= 0 && less(t, srt[j])) begin
            srt[j+1] = srt[j];
            j--;
          end
          srt[j+1] = t;
        end
        if (srt.size() > (1 << H) - 1)
          $fatal(1, "dictionary segment %0d has %0d affixes, tree holds %0d",
                 r, srt.size(), (1 << H) - 1);
        nodes[r] = srt;
        foreach (srt[i]) dmap[key(r, srt[i].dw, srt[i].aff)] = i + 1;
        foreach (words[w]) begin
          if (words[w].len() >= r*S)
            wd[w] = dmap[key(r, wd[w], words[w].substr((r-1)*S, r*S-1))];
        end
      end
      nroots = nodes[R].size();
      foreach (words[w])
        if (words[w].len() >= R*S) rootd[words[w].substr(0, R*S-1)] = wd[w];
    endfunction

    // 89-bit node for level lv, address a of pBST r.
    function logic [16+8*8+8:0] slot(int r, int lv, int a);
      int j;
      logic [63:0] lab;
      j = (2*a + 1) * (1 << (H-1-lv)) - 1;
      if (j >= nodes[r].size()) return {{80{1'b1}}, 9'b0};  // never matches
      lab = '0;
      for (int k = 0; k < nodes[r][j].aff.len(); k++)
        lab[(7-k)*8 +: 8] = nodes[r][j].aff[k];
      return {16'(nodes[r][j].dw), lab, nodes[r][j].bm,
              1'(nodes[r][j].aff.len() == S)};
    endfunction

    function int get_state(string s);
      if (!sid.exists(s)) begin
        sid[s] = sstr.size();
        sstr.push_back(s);
        s_br.push_back(0);
        s_off.push_back(0);
      end
      return sid[s];
    endfunction

    function bit has_out(string s);
      int L;
      L = R*S;
      for (int k = 0; s.len() - k > L; k++)
        if (wordset.exists(s.substr(k, s.len()-1))) return 1'b1;
      return 1'b0;
    endfunction

    function string children(string s);
      string c;
      c = "";
      for (int ch = 1; ch < 256; ch++)
        if (sid.exists({s, string'(8'(ch))})) c = {c, string'(8'(ch))};
      return c;
    endfunction

    // 1 when every child of s starts a single-child chain of len states
    // (the state len characters below s may branch again)
    function bit chains(string s, int len);
      string c;
      c = children(s);
      if (c.len() == 0 || c.len() > 8 / len) return 1'b0;
      for (int i = 0; i < c.len(); i++) begin
        string t;
        t = {s, string'(c[i])};
        for (int k = 1; k < len; k++) begin
          if (children(t).len() != 1) return 1'b0;
          t = {t, children(t)};
        end
      end
      return 1'b1;
    endfunction

    function void build_tafa();
      int    L, next_free;
      int    q[$];
      L = R*S;
      foreach (words[w]) begin
        if (words[w].len() <= L) continue;
        wordset[words[w]] = 1'b1;
        for (int k = L; k <= words[w].len(); k++)
          void'(get_state(words[w].substr(0, k-1)));
      end
      // tail roots without tails still need a (leaf) branch
      foreach (rootd[pfx]) void'(get_state(pfx));
      foreach (rootd[pfx]) begin
        s_br[sid[pfx]] = rootd[pfx];
        q.push_back(sid[pfx]);
      end
      next_free = nroots + 1;
      // pass 1: allocate branches (breadth first)
      while (q.size() > 0) begin
        int    st, b, chain;
        string s, c, t;
        logic [127:0] img;
        st = q.pop_front();
        s  = sstr[st];
        b  = s_br[st];
        c  = children(s);
        // length of the single-child chain below s
        chain = 0;
        t = s;
        while (chain < 8 && children(t).len() == 1) begin
          t = {t, children(t)};
          chain++;
        end
        img = '0;
        if (chain == 8) begin
          // mode 3, one full path
          int cs;
          n_mode3++;
          img[47:46] = 2'd3;
          img[63:56] = 8'hff;
          for (int k = 1; k <= 8; k++) begin
            string u;
            u = t.substr(0, s.len()-1+k);
            img[64 + (k-1)*8 +: 8] = u[u.len()-1];
            img[48 + k-1] = has_out(u);
            if (k < 8) begin
              s_br[sid[u]] = b;
              s_off[sid[u]] = k;
            end
          end
          cs = sid[t];
          s_br[cs] = next_free;
          img[19:0] = 20'(next_free);
          next_free++;
          q.push_back(cs);
        end else if (chain >= 2 && children(t).len() == 0) begin
          // mode 3, path cut short: the tail ends after `chain` characters
          n_mode3++;
          img[47:46] = 2'd3;
          for (int k = 1; k <= chain; k++) begin
            string u;
            u = t.substr(0, s.len()-1+k);
            img[64 + (k-1)*8 +: 8] = u[u.len()-1];
            img[56 + k-1] = 1'b1;
            img[48 + k-1] = has_out(u);
            s_br[sid[u]] = b;
            s_off[sid[u]] = k;
          end
        end else if (chains(s, 4) || chains(s, 2)) begin
          // mode 2 (two 4-character paths) or mode 1 (four 2-character paths)
          int len;
          len = chains(s, 4) ? 4 : 2;
          n_mode12++;
          img[47:46] = (len == 4) ? 2'd2 : 2'd1;
          img[19:0]  = 20'(next_free);
          img[42:40] = 3'(c.len() - 1);
          for (int i = 0; i < c.len(); i++) begin
            string u;
            u = s;
            for (int k = 1; k <= len; k++) begin
              u = (k == 1) ? {s, string'(c[i])} : {u, children(u)};
              img[64 + (i*len + k-1)*8 +: 8] = u[u.len()-1];
              img[56 + i*len + k-1] = 1'b1;
              img[48 + i*len + k-1] = has_out(u);
              if (k < len) begin
                s_br[sid[u]]  = b;
                s_off[sid[u]] = k;
              end
            end
            s_br[sid[u]] = next_free + i;
            q.push_back(sid[u]);
          end
          next_free += c.len();
        end else begin
          n_mode0++;
          if (c.len() > 8) $fatal(1, "state with more than 8 children");
          img[19:0] = (c.len() > 0) ? 20'(next_free) : 20'd0;
          img[42:40] = (c.len() > 0) ? 3'(c.len() - 1) : 3'd0;
          for (int i = 0; i < c.len(); i++) begin
            int cs;
            string u;
            u = {s, string'(c[i])};
            cs = sid[u];
            img[64 + i*8 +: 8] = c[i];
            img[56 + i] = 1'b1;
            img[48 + i] = has_out(u);
            s_br[cs] = next_free + i;
            q.push_back(cs);
          end
          next_free += c.len();
        end
        br[b] = img;
      end
      nbranches = next_free;
      // pass 2: failure branches of branch entry states
      foreach (br[b]) begin
        string s;
        int    st;
        st = -1;
        foreach (sstr[i]) if (s_br[i] == b && s_off[i] == 0 && sid.exists(sstr[i])) st = i;
        if (st < 0) continue;
        s = sstr[st];
        for (int k = 1; s.len() - k >= L; k++) begin
          string u;
          u = s.substr(k, s.len()-1);
          if (sid.exists(u)) begin
            br[b][39:20] = 20'(s_br[sid[u]]);
            br[b][45:43] = 3'(s_off[sid[u]]);
            if (s_off[sid[u]] != 0) n_roll++;
            break;
          end
        end
      end
    endfunction

  endclass

  // Random word over the first `alpha` lowercase letters.
  function automatic string rand_word(int len, int alpha);
    string s;
    s = "";
    for (int i = 0; i < len; i++) s = {s, string'(8'(8'h61 + $urandom_range(alpha-1)))};
    return s;
  endfunction

endpackage
