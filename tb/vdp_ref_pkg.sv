// vdp_ref_pkg: software reference for the virus detection processor tests.
//
// Plays the part of the host-side preprocessing and of a golden model:
//   * build_table  - Wu-Manber shift table over the first MIN_LEN characters
//                    of every pattern (2-character bad character), signature
//                    table of the 4-character search-window tails, merged
//                    into 4-bit {S-flag, carry} entries: S-flag set with the
//                    shift value cut to 3 bits, or S-flag clear with the
//                    OR of the patterns' one-hot signatures.
//   * build_trie   - compact trie with 4-character nodes, roots placed at
//                    the one-step hash of their first node, colliding roots
//                    and alternatives chained as siblings, new nodes of a
//                    pattern allocated at consecutive addresses, and the
//                    trie-skip fields:
//                      skip  = smallest s >= 1 such that the text known on
//                              leaving the node (its ancestors' characters
//                              A) from offset s on could still begin a
//                              pattern (or s = |A|; 1 for roots);
//                      jump  = when the first 4j characters of A[skip:]
//                              (j as large as the suffix offset allows) form a
//                              path of whole nodes, continue at the child
//                              of that path, suffix offset = 4j; characters
//                              of A after that are compared again.
//   * ref_matches  - brute-force search of every pattern at every position.
// The hash functions are re-implemented here from their definitions.
// Patterns must be at least MIN_LEN long and no pattern may be a prefix of
// another.
package vdp_ref_pkg;
  import vdp_pkg::*;

  // ---------------- hashes ----------------
  function automatic int unsigned sig_bit(logic [31:0] w);
    logic [7:0] f;
    f = w[31:24] ^ w[23:16] ^ w[15:8] ^ w[7:0];
    return int'(f) % CARRY_W;
  endfunction

  function automatic int unsigned root_of(logic [31:0] w, int unsigned root_bits);
    logic [31:0] p;
    p = w * 32'h9E3779B1;
    return int'(p >> (32 - root_bits));
  endfunction

  function automatic logic [31:0] word4(string s, int i);
    return {s[i], s[i+1], s[i+2], s[i+3]};
  endfunction

  // ---------------- shift-signature table ----------------
  ss_entry_t tbl [int];   // sparse: missing index = {1, 7}

  function automatic ss_entry_t tbl_get(int idx);
    if (tbl.exists(idx)) return tbl[idx];
    return '{sflag: 1'b1, carry: 3'd7};
  endfunction

  function automatic void build_table(string pats[$], int min_len);
    int          shift [int];
    logic [2:0]  sig   [int];
    tbl.delete();
    foreach (pats[k]) begin
      for (int j = 0; j + 1 < min_len; j++) begin
        int idx = {pats[k][j], pats[k][j+1]};
        int s   = min_len - 2 - j;
        if (!shift.exists(idx) || s < shift[idx]) shift[idx] = s;
      end
    end
    foreach (pats[k]) begin
      int idx = {pats[k][min_len-2], pats[k][min_len-1]};
      logic [2:0] b = 3'b001 << sig_bit(word4(pats[k], min_len - 4));
      if (!sig.exists(idx)) sig[idx] = '0;
      sig[idx] |= b;
    end
    foreach (shift[idx]) begin
      if (shift[idx] == 0) tbl[idx] = '{sflag: 1'b0, carry: sig[idx]};
      else tbl[idx] = '{sflag: 1'b1, carry: (shift[idx] > 7) ? 3'd7 : 3'(shift[idx])};
    end
  endfunction

  // ---------------- trie ----------------
  trie_node_t nodes [int];
  string      anc   [int];   // ancestors' characters of each node
  int         next_free;
  int         rbits;
  string      pset  [$];

  function automatic trie_node_t get_node(int a);
    if (nodes.exists(a)) return nodes[a];
    return '0;
  endfunction

  function automatic string node_str(trie_node_t n);
    string s = "";
    for (int i = 0; i <= int'(n.len_m1); i++) s = {s, string'(n.content[31-8*i -: 8])};
    return s;
  endfunction

  function automatic trie_node_t mk_node(string chunk);
    trie_node_t n = '0;
    n.valid  = 1'b1;
    n.len_m1 = 2'(chunk.len() - 1);
    for (int i = 0; i < chunk.len(); i++) n.content[31-8*i -: 8] = chunk[i];
    n.skip = SKIP_W'(1);
    return n;
  endfunction

  // Find a node with this chunk in the chain starting at `first`; -1 if none.
  function automatic int find_in_chain(int first, string chunk);
    int a = first;
    while (1) begin
      trie_node_t n = get_node(a);
      if (n.valid && node_str(n) == chunk) return a;
      if (!n.has_sib) return -1;
      a = int'(n.sibling);
    end
  endfunction

  function automatic int last_in_chain(int first);
    int a = first;
    while (get_node(a).has_sib) a = int'(get_node(a).sibling);
    return a;
  endfunction

  function automatic int alloc(string chunk, string ancestors);
    int a = next_free;
    next_free++;
    nodes[a] = mk_node(chunk);
    anc[a]   = ancestors;
    return a;
  endfunction

  // Walk a whole-node path; returns its last node or -1.
  function automatic int find_path(string p);
    int a, k;
    if (p.len() == 0 || p.len() % 4 != 0) return -1;
    a = root_of(word4(p, 0), rbits);
    a = find_in_chain(a, p.substr(0, 3));
    for (k = 4; a >= 0 && k < p.len(); k += 4) begin
      trie_node_t n = get_node(a);
      if (!n.has_child) return -1;
      a = find_in_chain(int'(n.child), p.substr(k, k + 3));
    end
    return a;
  endfunction

  function automatic bit compatible(string x);
    foreach (pset[k]) begin
      int l = (x.len() < pset[k].len()) ? x.len() : pset[k].len();
      if (l == 0 || x.substr(0, l - 1) == pset[k].substr(0, l - 1)) return 1;
    end
    return 0;
  endfunction

  function automatic void build_trie(string pats[$], int root_bits);
    nodes.delete();
    anc.delete();
    pset      = pats;
    rbits     = root_bits;
    next_free = 1 << root_bits;
    foreach (pats[k]) begin
      string p = pats[k];
      int    a = -1;
      for (int i = 0; i < p.len(); i += 4) begin
        int    e     = (i + 3 < p.len()) ? i + 3 : p.len() - 1;
        string chunk = p.substr(i, e);
        string ancs  = (i == 0) ? "" : p.substr(0, i - 1);
        int    f;
        if (i == 0) begin
          int slot = root_of(word4(p, 0), root_bits);
          if (!get_node(slot).valid) begin
            nodes[slot] = mk_node(chunk);
            anc[slot]   = "";
            f = slot;
          end else begin
            f = find_in_chain(slot, chunk);
            if (f < 0) begin
              trie_node_t l;
              int la = last_in_chain(slot);
              f = alloc(chunk, ancs);
              l = nodes[la]; l.has_sib = 1'b1; l.sibling = node_addr_t'(f); nodes[la] = l;
            end
          end
        end else begin
          trie_node_t pn = nodes[a];
          if (!pn.has_child) begin
            f = alloc(chunk, ancs);
            pn.has_child = 1'b1; pn.child = node_addr_t'(f); nodes[a] = pn;
          end else begin
            f = find_in_chain(int'(pn.child), chunk);
            if (f < 0) begin
              trie_node_t l;
              int la = last_in_chain(int'(pn.child));
              f = alloc(chunk, ancs);
              l = nodes[la]; l.has_sib = 1'b1; l.sibling = node_addr_t'(f); nodes[la] = l;
            end
          end
        end
        a = f;
      end
      begin
        trie_node_t n = nodes[a];
        n.is_match = 1'b1;
        n.pid      = PID_W'(k);
        nodes[a]   = n;
      end
    end
    // trie-skip fields
    foreach (nodes[a]) begin
      trie_node_t n = nodes[a];
      string A = anc[a];
      int s = 1;
      if (A.len() > 0) begin
        for (s = 1; s < A.len(); s++) if (compatible(A.substr(s, A.len() - 1))) break;
      end
      if (s > (1 << SKIP_W) - 1) s = (1 << SKIP_W) - 1;   // a shorter skip is always safe
      n.skip = SKIP_W'(s);
      // jump past the longest run of whole nodes (as far as the suffix
      // offset reaches) that the
      // bytes A[s..] already matched; the bytes after it are compared again
      if (A.len() - s >= 4) begin
        int j = (A.len() - s) / 4;
        if (4 * j > (1 << SOFF_W) - 1) j = ((1 << SOFF_W) - 1) / 4;
        begin
          int t = find_path(A.substr(s, s + 4 * j - 1));
          if (t >= 0 && get_node(t).has_child) begin
            n.jump_en    = 1'b1;
            n.jump_node  = get_node(t).child;
            n.suffix_off = SOFF_W'(4 * j);
          end
        end
      end
      nodes[a] = n;
    end
  endfunction

  // ---------------- golden matcher ----------------
  typedef struct { int pid; int pos; } hit_t;

  function automatic void ref_matches(string text, string pats[$], ref hit_t hits[$]);
    hits.delete();
    for (int p = 0; p < text.len(); p++)
      foreach (pats[k])
        if (p + pats[k].len() <= text.len() && text.substr(p, p + pats[k].len() - 1) == pats[k])
          hits.push_back('{pid: k, pos: p});
  endfunction

endpackage
