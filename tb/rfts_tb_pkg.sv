// rfts_tb_pkg: testbench support for the RFTS checker.
//
// Holds a fault-pattern set and builds from it, the way host software would
// before a run, the two tables the hardware reads:
//  * the shift-signature table image: for every 2-character block, the
//    smallest distance from that block to the end of a pattern's first WIN_LEN
//    characters (a shift value, S-flag set), or, where that distance is 0, the
//    OR of the Bloom signatures of the last four characters of those windows
//    (S-flag clear);
//  * the compact trie image for off-chip memory: 4-character slices linked by
//    child and sibling pointers, hashed root buckets, partial last slices
//    placed ahead of full slices in a sibling chain.
// It also gives an independent reference: a direct search of the text for
// every pattern (windows looked up by their first WIN_LEN characters, then
// compared in full), which never uses the hardware's hash functions.
package rfts_tb_pkg;
  import rfts_pkg::*;

  typedef byte unsigned bytes_t[$];

  bytes_t      pats[$];
  logic [15:0] sst_img [2**SST_AW];
  mdata_t      img [int unsigned];          // trie nodes by word address
  int unsigned next_free;
  int unsigned n_nodes_built;

  // ---- pattern set ---------------------------------------------------------
  bit seen [longint];

  // Duplicate test by a 64-bit FNV-1a digest of the pattern.
  function automatic bit is_dup(bytes_t p);
    longint h;
    h = 64'hcbf29ce484222325;
    foreach (p[i]) h = (h ^ longint'(p[i])) * 64'h100000001b3;
    h = h ^ longint'(p.size());
    if (seen.exists(h)) return 1'b1;
    seen[h] = 1'b1;
    return 1'b0;
  endfunction

  // n patterns of length minl..maxl over an alphabet of 'alpha' symbols.
  // About a quarter extend or share a prefix with an earlier pattern, so the
  // trie gets shared paths, sibling chains and patterns ending inside others.
  function automatic void gen_patterns(int n, int minl, int maxl, int alpha);
    pats.delete();
    seen.delete();
    while (pats.size() < n) begin
      bytes_t p;
      int kind;
      kind = (pats.size() > 4) ? $urandom_range(7) : 7;
      p = {};
      if (kind == 0) begin                 // extend an earlier pattern
        p = pats[$urandom_range(pats.size()-1)];
        repeat ($urandom_range(7, 1)) p.push_back(8'($urandom_range(alpha-1)));
      end else if (kind == 1) begin        // share whole slices of an earlier one
        bytes_t q;
        int keep;
        q = pats[$urandom_range(pats.size()-1)];
        keep = 4 * $urandom_range(q.size()/4, 1);
        for (int i = 0; i < keep; i++) p.push_back(q[i]);
        while (p.size() < minl || $urandom_range(3) != 0)
          p.push_back(8'($urandom_range(alpha-1)));
      end else begin
        int l;
        l = $urandom_range(maxl, minl);
        repeat (l) p.push_back(8'($urandom_range(alpha-1)));
      end
      if (p.size() < minl || p.size() > maxl) continue;
      if (is_dup(p)) continue;
      pats.push_back(p);
    end
  endfunction

  // ---- shift-signature table ---------------------------------------------------
  function automatic void build_sst();
    int unsigned         sh  [2**SST_AW];
    logic [CARRY_W-1:0]  sig [2**SST_AW];
    for (int i = 0; i < 2**SST_AW; i++) begin sh[i] = MAX_SHIFT; sig[i] = '0; end
    foreach (pats[k]) begin
      for (int j = BLK_LEN-1; j < WIN_LEN; j++) begin
        int unsigned ix;
        ix = int'(sst_index(pats[k][j-1], pats[k][j]));
        if (WIN_LEN-1-j < sh[ix]) sh[ix] = WIN_LEN-1-j;
      end
      begin
        int unsigned ix;
        logic [31:0] tail;
        ix = int'(sst_index(pats[k][WIN_LEN-2], pats[k][WIN_LEN-1]));
        tail = {pats[k][WIN_LEN-1], pats[k][WIN_LEN-2], pats[k][WIN_LEN-3], pats[k][WIN_LEN-4]};
        sig[ix] |= bloom_sig(tail);
      end
    end
    for (int i = 0; i < 2**SST_AW; i++)
      sst_img[i] = (sh[i] != 0) ? {1'b1, CARRY_W'(sh[i])} : {1'b0, sig[i]};
  endfunction

  // ---- compact trie ------------------------------------------------------------
  function automatic trie_node_t rd(int unsigned a);
    if (img.exists(a)) return trie_node_t'(img[a]);
    return '0;
  endfunction

  function automatic logic [31:0] slice_of(bytes_t p, int k, output int len);
    logic [31:0] s;
    s = '0;
    len = 0;
    for (int i = 0; i < SLICE_LEN; i++)
      if (4*k + i < p.size()) begin
        s[i*8 +: 8] = p[4*k+i];
        len++;
      end
    return s;
  endfunction

  function automatic int unsigned new_node(logic [31:0] s, int len);
    trie_node_t n;
    int unsigned a;
    n = '0;
    n.valid = 1'b1;
    n.slice = s;
    n.slen  = 3'(len);
    a = next_free++;
    img[a] = mdata_t'(n);
    n_nodes_built++;
    return a;
  endfunction

  function automatic void insert(bytes_t p, int pid);
    int          ns, len;
    logic [31:0] s;
    int unsigned cur, a, b;
    trie_node_t  n;
    ns = (p.size() + SLICE_LEN - 1) / SLICE_LEN;
    s  = slice_of(p, 0, len);
    b  = int'(root_hash(s));
    n  = rd(b);
    if (!n.valid) begin
      n = '0; n.valid = 1'b1; n.slice = s; n.slen = 3'(len);
      img[b] = mdata_t'(n);
      n_nodes_built++;
      cur = b;
    end else begin
      bit hit;
      a = b;
      hit = 1'b0;
      forever begin
        n = rd(a);
        if (n.slen == 3'(SLICE_LEN) && n.slice == s) begin cur = a; hit = 1'b1; break; end
        if (n.sibling == '0) break;
        a = 32'(n.sibling);
      end
      if (!hit) begin
        cur = new_node(s, len);
        n = rd(a); n.sibling = maddr_t'(cur); img[a] = mdata_t'(n);
      end
    end
    for (int k = 1; k < ns; k++) begin
      trie_node_t pn;
      int unsigned found;
      s  = slice_of(p, k, len);
      pn = rd(cur);
      if (len < SLICE_LEN) begin
        a = new_node(s, len);
        n = rd(a); n.is_end = 1'b1; n.pid = PID_W'(pid); n.sibling = pn.child;
        img[a] = mdata_t'(n);
        pn.child = maddr_t'(a); img[cur] = mdata_t'(pn);
        return;
      end
      found = 0;
      if (pn.child == '0) begin
        a = new_node(s, len);
        pn.child = maddr_t'(a); img[cur] = mdata_t'(pn);
        found = a;
      end else begin
        a = 32'(pn.child);
        forever begin
          n = rd(a);
          if (n.slen == 3'(SLICE_LEN) && n.slice == s) begin found = a; break; end
          if (n.sibling == '0) break;
          a = 32'(n.sibling);
        end
        if (found == 0) begin
          found = new_node(s, len);
          n = rd(a); n.sibling = maddr_t'(found); img[a] = mdata_t'(n);
        end
      end
      cur = found;
    end
    n = rd(cur); n.is_end = 1'b1; n.pid = PID_W'(pid); img[cur] = mdata_t'(n);
  endfunction

  function automatic void build_trie();
    img.delete();
    next_free = 2**ROOT_AW;
    n_nodes_built = 0;
    foreach (pats[k]) insert(pats[k], k);
  endfunction

  // ---- text and reference search --------------------------------------------------
  // Random text over the alphabet with copies of patterns planted; half of
  // the copies come from a hot set of 32 patterns, so some recur. Copies
  // start at multiples of 'align' (whole code words when align is the word
  // length in characters).
  function automatic void gen_text(ref bytes_t t, input int len, int alpha, int plants, int align = 1);
    t = {};
    repeat (len) t.push_back(8'($urandom_range(alpha-1)));
    repeat (plants) begin
      bytes_t p;
      int at;
      if ($urandom_range(1) == 0) p = pats[$urandom_range(pats.size() < 32 ? pats.size()-1 : 31)];
      else                        p = pats[$urandom_range(pats.size()-1)];
      if (p.size() > len) continue;
      at = align * $urandom_range((len - p.size()) / align);
      foreach (p[i]) t[at+i] = p[i];
    end
  endfunction

  // Every (position, pattern id) occurrence, keyed pos*65536 + pid.
  function automatic void reference(bytes_t t, ref bit exp[longint]);
    int idx[longint][$];
    exp.delete();
    foreach (pats[k]) begin
      longint key;
      key = 0;
      for (int i = 0; i < WIN_LEN; i++) key = (key << 8) | longint'(pats[k][i]);
      idx[key].push_back(k);
    end
    for (int p = 0; p + WIN_LEN <= t.size(); p++) begin
      longint key;
      key = 0;
      for (int i = 0; i < WIN_LEN; i++) key = (key << 8) | longint'(t[p+i]);
      if (idx.exists(key)) begin
        int cand[$];
        cand = idx[key];
        foreach (cand[j]) begin
          int k;
          bit ok;
          k  = cand[j];
          ok = (p + pats[k].size() <= t.size());
          for (int i = 0; ok && i < pats[k].size(); i++) if (t[p+i] != pats[k][i]) ok = 0;
          if (ok) exp[longint'(p) * 65536 + longint'(k)] = 1'b1;
        end
      end
    end
  endfunction
endpackage
