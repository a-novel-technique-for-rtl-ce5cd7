// fppc_tb_pkg: testbench support for the packet classifier.
//
// - tb_rule_t: a full 5-field rule (S_ad and D_ad prefixes plus the stored
//   rule fields).
// - ref_classify: reference classifier, a plain linear search over all rules
//   that returns the best match in the same priority order as the design.
//   It shares nothing with the tree/trie structure and so checks it.
// - table_builder: the control-plane software model. It clusters the S_ad
//   prefixes into C sets of pairwise disjoint prefixes (repeatedly moving
//   the leaves of the prefix trie into the next cluster), builds a balanced
//   binary search tree per cluster, builds a T_eps trie per S_ad prefix
//   (at most R_TRIE rules per node, full nodes split into epsilon chains),
//   maps tree levels and trie depths onto pipeline stages and lists the
//   node writes the hardware needs.
// - gen_rules / packet helpers for random rule sets and packets.
package fppc_tb_pkg;
  import fppc_pkg::*;

  typedef struct {
    logic [31:0] sad;
    int          sad_len;
    logic [31:0] dad;
    int          dad_len;
    rule_t       r;
  } tb_rule_t;

  typedef struct {
    int        cluster;
    int        level;
    int        addr;
    sad_node_t node;
  } sad_wr_t;

  typedef struct {
    int         cluster;
    int         stage;
    int         addr;
    trie_node_t node;
    rule_t      rules [8];
  } trie_wr_t;

  function automatic logic [31:0] mask_of(input int len);
    return (len == 0) ? 32'h0 : (32'hFFFF_FFFF << (32 - len));
  endfunction

  function automatic bit rule_matches(input tb_rule_t x, input five_tuple_t h);
    return (((h.sad ^ x.sad) & mask_of(x.sad_len)) == 0) &&
           (((h.dad ^ x.dad) & mask_of(x.dad_len)) == 0) &&
           h.spn >= x.r.spn_lo && h.spn <= x.r.spn_hi &&
           h.dpn >= x.r.dpn_lo && h.dpn <= x.r.dpn_hi &&
           (x.r.ptcl_any || h.ptcl == x.r.ptcl);
  endfunction

  function automatic match_t ref_classify(ref tb_rule_t rules[$], input five_tuple_t h);
    match_t best;
    best = '0;
    foreach (rules[i]) begin
      if (rule_matches(rules[i], h)) begin
        if (!best.hit || rules[i].r.pt < best.pt ||
            (rules[i].r.pt == best.pt && rules[i].r.id < best.id)) begin
          best.hit    = 1'b1;
          best.pt     = rules[i].r.pt;
          best.id     = rules[i].r.id;
          best.action = rules[i].r.action;
        end
      end
    end
    return best;
  endfunction

  // IPv4 header bytes (64-byte bus, byte 0 in the top byte) for a 5-tuple.
  function automatic logic [HDR_BYTES*8-1:0] make_hdr(input five_tuple_t t, input int ihl,
                                                      input int frag_off, input int version);
    logic [7:0] b [HDR_BYTES];
    logic [HDR_BYTES*8-1:0] h;
    foreach (b[i]) b[i] = 8'($urandom);
    b[0]  = {4'(version), 4'(ihl)};
    b[6]  = {3'b000, 5'(frag_off >> 8)};
    b[7]  = 8'(frag_off);
    b[9]  = t.ptcl;
    {b[12], b[13], b[14], b[15]} = t.sad;
    {b[16], b[17], b[18], b[19]} = t.dad;
    if (4 * ihl + 3 < HDR_BYTES) begin
      {b[4*ihl], b[4*ihl+1]}   = t.spn;
      {b[4*ihl+2], b[4*ihl+3]} = t.dpn;
    end
    for (int i = 0; i < HDR_BYTES; i++) h[(HDR_BYTES-1-i)*8 +: 8] = b[i];
    return h;
  endfunction

  // A header that matches rule x (random bits outside its prefixes).
  function automatic five_tuple_t tuple_for(input tb_rule_t x);
    five_tuple_t t;
    t.sad  = (x.sad & mask_of(x.sad_len)) | ($urandom & ~mask_of(x.sad_len));
    t.dad  = (x.dad & mask_of(x.dad_len)) | ($urandom & ~mask_of(x.dad_len));
    t.spn  = 16'(x.r.spn_lo + ($urandom % (32'(x.r.spn_hi) - 32'(x.r.spn_lo) + 1)));
    t.dpn  = 16'(x.r.dpn_lo + ($urandom % (32'(x.r.dpn_hi) - 32'(x.r.dpn_lo) + 1)));
    t.ptcl = x.r.ptcl_any ? (($urandom % 2) ? PROTO_TCP : PROTO_UDP) : x.r.ptcl;
    return t;
  endfunction

  function automatic void set_port(ref rule_t r, input bit src, input int kind, input int v);
    logic [15:0] lo, hi;
    case (kind)
      0: begin lo = 16'h0000; hi = 16'hFFFF; end
      1: begin lo = 16'(v); hi = 16'(v); end
      default: begin lo = 16'(v); hi = 16'((v + 1000 > 65535) ? 65535 : v + 1000); end
    endcase
    if (src) begin r.spn_lo = lo; r.spn_hi = hi; end
    else     begin r.dpn_lo = lo; r.dpn_hi = hi; end
  endfunction

  // Random rule set, ClassBench-like in spirit: few S_ad and D_ad prefixes
  // shared by many rules, S_ad prefix lengths 8/16/24/32 so that prefix
  // nesting is at most 4 deep (fits 4 clusters).
  function automatic void gen_rules(ref tb_rule_t rules[$], input int n);
    logic [31:0] sv[$], dv[$];
    int          sl[$], dl[$];
    int          ns, nd, j;
    int          ports[6] = '{53, 80, 443, 17, 44, 100};
    tb_rule_t    x;
    ns = (n / 6 < 4) ? 4 : n / 6;
    nd = (n / 4 < 4) ? 4 : n / 4;
    for (int i = 0; i < ns; i++) begin
      int len;
      logic [31:0] v;
      len = 8 * (1 + ($urandom % 4));
      v = $urandom;
      if (i > 0 && ($urandom % 2)) begin
        j = $urandom % i;
        if (sl[j] < len) v = (sv[j] & mask_of(sl[j])) | (v & ~mask_of(sl[j]));
      end
      sv.push_back(v & mask_of(len));
      sl.push_back(len);
    end
    for (int i = 0; i < nd; i++) begin
      int len;
      logic [31:0] v;
      len = $urandom % 33;
      v = $urandom;
      if (i > 0 && ($urandom % 2)) begin
        j = $urandom % i;
        if (dl[j] < len) v = (dv[j] & mask_of(dl[j])) | (v & ~mask_of(dl[j]));
      end
      dv.push_back(v & mask_of(len));
      dl.push_back(len);
    end
    rules.delete();
    for (int i = 0; i < n; i++) begin
      j = $urandom % ns;
      x.sad = sv[j]; x.sad_len = sl[j];
      j = $urandom % nd;
      x.dad = dv[j]; x.dad_len = dl[j];
      x.r = '0;
      for (int s = 0; s < 2; s++) begin
        int k;
        k = $urandom % 4;
        set_port(x.r, s == 0, (k == 3) ? 2 : (k == 2) ? 1 : 0,
                 (k == 3) ? int'($urandom % 60000) : ports[$urandom % 6]);
      end
      x.r.ptcl_any = ($urandom % 10) < 3;
      x.r.ptcl     = ($urandom % 2) ? PROTO_TCP : PROTO_UDP;
      x.r.pt       = 16'($urandom % 256);
      x.r.id       = RULE_ID_W'(i);
      x.r.action   = 8'(i);
      rules.push_back(x);
    end
  endfunction

  class table_builder;
    int C, S_LEVELS, TRIE_STAGES, TRIE_NODES, R_TRIE;
    sad_wr_t  sad_wr[$];
    trie_wr_t trie_wr[$];
    int       rule_cluster[int];  // rule id -> cluster
    bit       rule_in_eps[int];   // rule id -> stored in a node reached by an epsilon branch
    int       eps_nodes;
    int       max_trie_stage;
    int       max_tree_level;
    int       max_nodes_per_stage;
    bit       ok;
    string    err;

    function new(int c, int sl, int ts, int tn, int rt);
      C = c; S_LEVELS = sl; TRIE_STAGES = ts; TRIE_NODES = tn; R_TRIE = rt;
    endfunction

    function void fail(string s);
      if (ok) err = s;
      ok = 0;
    endfunction

    function void build(ref tb_rule_t rules[$]);
      logic [31:0] pv[$];
      int          pl[$], pc[$], proot[$];
      int          rule_p[$];
      int          talloc[];
      ok = 1; err = "";
      sad_wr.delete(); trie_wr.delete();
      rule_cluster.delete(); rule_in_eps.delete();
      eps_nodes = 0; max_trie_stage = 0; max_tree_level = 0; max_nodes_per_stage = 0;
      // 1. distinct S_ad prefixes
      foreach (rules[i]) begin
        int f;
        f = -1;
        foreach (pv[p]) if (pl[p] == rules[i].sad_len && pv[p] == (rules[i].sad & mask_of(pl[p]))) f = p;
        if (f < 0) begin
          pv.push_back(rules[i].sad & mask_of(rules[i].sad_len));
          pl.push_back(rules[i].sad_len);
          pc.push_back(-1);
          proot.push_back(0);
          f = pv.size() - 1;
        end
        rule_p.push_back(f);
      end
      // 2. clustering: leaves of the remaining prefix trie go to cluster c
      for (int c = 0; c < C; c++) begin
        bit leaf[$];
        foreach (pv[p]) begin
          bit lf;
          lf = (pc[p] < 0);
          if (lf)
            foreach (pv[q])
              if (q != p && pc[q] < 0 && pl[q] > pl[p] && ((pv[q] ^ pv[p]) & mask_of(pl[p])) == 0)
                lf = 0;
          leaf.push_back(lf);
        end
        foreach (pv[p]) if (leaf[p]) pc[p] = c;
      end
      foreach (pv[p]) if (pc[p] < 0) fail("S_ad prefixes nest deeper than C");
      foreach (rules[i]) rule_cluster[int'(rules[i].r.id)] = pc[rule_p[i]];
      // 3. T_eps tries, per cluster, stage memories shared by the cluster
      for (int c = 0; c < C; c++) begin
        talloc = new[TRIE_STAGES];
        foreach (pv[p]) begin
          int tl[$], tr[$], tc[$], trl[$], tstage[$], taddr[$];
          bit te[$], tviaeps[$];
          int bfs[$];
          if (pc[p] != c) continue;
          // root
          tl.push_back(-1); tr.push_back(-1); te.push_back(0); tc.push_back(0);
          for (int k = 0; k < 8; k++) trl.push_back(-1);
          foreach (rules[i]) begin
            int n;
            if (rule_p[i] != p) continue;
            n = 0;
            for (int b = 0; b < rules[i].dad_len; b++) begin
              int ch;
              while (te[n]) n = tl[n];
              ch = rules[i].dad[31-b] ? tr[n] : tl[n];
              if (ch < 0) begin
                tl.push_back(-1); tr.push_back(-1); te.push_back(0); tc.push_back(0);
                for (int k = 0; k < 8; k++) trl.push_back(-1);
                ch = tl.size() - 1;
                if (rules[i].dad[31-b]) tr[n] = ch; else tl[n] = ch;
              end
              n = ch;
            end
            forever begin
              if (tc[n] < R_TRIE) begin
                trl[8*n + tc[n]] = i; tc[n]++;
                break;
              end else if (te[n]) begin
                n = tl[n];
              end else begin
                int nw;
                tl.push_back(tl[n]); tr.push_back(tr[n]); te.push_back(0); tc.push_back(0);
                for (int k = 0; k < 8; k++) trl.push_back(-1);
                nw = tl.size() - 1;
                tl[n] = nw; tr[n] = -1; te[n] = 1;
                eps_nodes++;
                trl[8*nw] = i; tc[nw] = 1;
                break;
              end
            end
          end
          // stage assignment, breadth first
          foreach (tl[n]) begin tstage.push_back(-1); taddr.push_back(-1); tviaeps.push_back(0); end
          tstage[0] = 0;
          bfs.push_back(0);
          while (bfs.size() > 0) begin
            int n;
            n = bfs.pop_front();
            if (tstage[n] >= TRIE_STAGES) begin fail("trie deeper than TRIE_STAGES"); continue; end
            if (talloc[tstage[n]] >= TRIE_NODES) begin fail("trie stage full"); continue; end
            taddr[n] = talloc[tstage[n]]++;
            if (talloc[tstage[n]] > max_nodes_per_stage) max_nodes_per_stage = talloc[tstage[n]];
            if (tstage[n] > max_trie_stage) max_trie_stage = tstage[n];
            if (tl[n] >= 0) begin
              tstage[tl[n]] = tstage[n] + 1;
              tviaeps[tl[n]] = te[n];
              bfs.push_back(tl[n]);
            end
            if (!te[n] && tr[n] >= 0) begin
              tstage[tr[n]] = tstage[n] + 1;
              bfs.push_back(tr[n]);
            end
          end
          proot[p] = taddr[0];
          foreach (tl[n]) begin
            trie_wr_t w;
            if (taddr[n] < 0) continue;
            w.cluster = c; w.stage = tstage[n]; w.addr = taddr[n];
            w.node = '0;
            w.node.eps = te[n];
            w.node.left_v = (tl[n] >= 0);
            w.node.left = (tl[n] >= 0) ? PTR_W'(taddr[tl[n]]) : '0;
            w.node.right_v = !te[n] && (tr[n] >= 0);
            w.node.right = (!te[n] && tr[n] >= 0) ? PTR_W'(taddr[tr[n]]) : '0;
            w.node.count = 4'(tc[n]);
            for (int k = 0; k < 8; k++) begin
              w.rules[k] = '0;
              if (k < tc[n]) begin
                w.rules[k] = rules[trl[8*n+k]].r;
                if (tviaeps[n]) rule_in_eps[int'(rules[trl[8*n+k]].r.id)] = 1;
              end
            end
            trie_wr.push_back(w);
          end
        end
      end
      // 4. balanced S_ad binary search tree per cluster
      for (int c = 0; c < C; c++) begin
        int idx[$], alloc[], qlo[$], qhi[$], qlev[$], qpar[$], qside[$];
        int rlev[$], raddr[$];
        sad_wr_t recs[$];
        alloc = new[S_LEVELS];
        foreach (pv[p]) if (pc[p] == c) idx.push_back(p);
        // sort by prefix value (disjoint prefixes have distinct starts)
        for (int a = 1; a < idx.size(); a++)
          for (int b = a; b > 0 && pv[idx[b]] < pv[idx[b-1]]; b--) begin
            int t;
            t = idx[b]; idx[b] = idx[b-1]; idx[b-1] = t;
          end
        qlo.push_back(0); qhi.push_back(idx.size() - 1); qlev.push_back(0);
        qpar.push_back(-1); qside.push_back(0);
        while (qlo.size() > 0) begin
          int lo, hi, lev, par, side, mid, ad;
          sad_wr_t w;
          lo = qlo.pop_front(); hi = qhi.pop_front(); lev = qlev.pop_front();
          par = qpar.pop_front(); side = qside.pop_front();
          if (lo > hi) continue;
          if (lev >= S_LEVELS || alloc[lev] >= (1 << lev)) begin fail("S_ad tree too deep"); continue; end
          mid = (lo + hi) / 2;
          ad = alloc[lev]++;
          if (lev > max_tree_level) max_tree_level = lev;
          w.cluster = c; w.level = lev; w.addr = ad;
          w.node = '0;
          w.node.prefix = pv[idx[mid]];
          w.node.len = 6'(pl[idx[mid]]);
          w.node.trie_root = PTR_W'(proot[idx[mid]]);
          recs.push_back(w);
          if (par >= 0) begin
            if (side == 0) begin recs[par].node.left_v = 1;  recs[par].node.left  = PTR_W'(ad); end
            else           begin recs[par].node.right_v = 1; recs[par].node.right = PTR_W'(ad); end
          end
          qlo.push_back(lo);      qhi.push_back(mid - 1); qlev.push_back(lev + 1);
          qpar.push_back(recs.size() - 1); qside.push_back(0);
          qlo.push_back(mid + 1); qhi.push_back(hi);      qlev.push_back(lev + 1);
          qpar.push_back(recs.size() - 1); qside.push_back(1);
        end
        foreach (recs[r]) sad_wr.push_back(recs[r]);
      end
    endfunction
  endclass

  // The 17-rule example classifier of the design description (Table 1).
  // '*' ports are full ranges, '*' protocol is a wildcard.
  function automatic void example_rules(ref tb_rule_t rules[$]);
    // sad, sad_len, dad, dad_len, spn(-1 = *), dpn, proto(0 = *), PT
    int tbl[17][8] = '{
      '{32'b00 << 30, 2, 32'b00 << 30, 2, -1, 80, 6, 1},
      '{32'b0  << 31, 1, 32'b0  << 31, 1, 17, -1, 17, 2},
      '{32'b10 << 30, 2, 32'b10 << 30, 2, -1, -1, 6, 2},
      '{32'b11 << 30, 2, 32'b10 << 30, 2, -1, 100, 6, 3},
      '{32'b11 << 30, 2, 32'b1  << 31, 1, -1, -1, 0, 4},
      '{0,            0, 32'b11 << 30, 2, 17, 44, 17, 5},
      '{32'b0  << 31, 1, 32'b10 << 30, 2, 80, -1, 6, 6},
      '{32'b0  << 31, 1, 32'b01 << 30, 2, 17, 17, 17, 6},
      '{32'b0  << 31, 1, 32'b1  << 31, 1, 44, -1, 6, 7},
      '{32'b00 << 30, 2, 32'b1  << 31, 1, 17, 44, 17, 7},
      '{32'b00 << 30, 2, 32'b11 << 30, 2, -1, 100, 6, 8},
      '{32'b10 << 30, 2, 32'b1  << 31, 1, -1, -1, 0, 9},
      '{0,            0, 32'b00 << 30, 2, -1, -1, 6, 7},
      '{32'b0  << 31, 1, 32'b10 << 30, 2, -1, 100, 6, 5},
      '{32'b0  << 31, 1, 32'b1  << 31, 1, -1, -1, 6, 0},
      '{32'b0  << 31, 1, 32'b10 << 30, 2, 17, 17, 17, 4},
      '{32'b111 << 29, 3, 32'b000 << 29, 3, 80, -1, 6, 6}};
    tb_rule_t x;
    rules.delete();
    for (int i = 0; i < 17; i++) begin
      x.sad = 32'(tbl[i][0]); x.sad_len = tbl[i][1];
      x.dad = 32'(tbl[i][2]); x.dad_len = tbl[i][3];
      x.r = '0;
      set_port(x.r, 1, (tbl[i][4] < 0) ? 0 : 1, tbl[i][4]);
      set_port(x.r, 0, (tbl[i][5] < 0) ? 0 : 1, tbl[i][5]);
      x.r.ptcl_any = (tbl[i][6] == 0);
      x.r.ptcl     = 8'(tbl[i][6]);
      x.r.pt       = 16'(tbl[i][7]);
      x.r.id       = RULE_ID_W'(i + 1);  // R_1 .. R_17
      x.r.action   = 8'(i);              // Act0 .. Act16
      rules.push_back(x);
    end
  endfunction

endpackage
