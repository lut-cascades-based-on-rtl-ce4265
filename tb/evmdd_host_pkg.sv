// evmdd_host_pkg: testbench model of the host software that programs the
// classifier. It works out the memory words of the LUT cascades from a rule
// set, independently of the RTL's datapath, and gives the reference answer
// for a header.
//
// A field function is a step function: with the sorted segment start points
// b_1 < b_2 < ... (all > 0), f(X) = number of b_i <= X, which is M1-monotone
// increasing. Its EVMDD(k) is built level by level: after the top j+1 super
// variables a key has reached prefix P; the node for P is a node of its own
// if a start point lies strictly inside P's range (ids 0, 1, ... in ascending
// prefix order), otherwise the constant-zero node, which takes the next id. The edge from P
// with digit d has weight = number of start points in (P*2^(m+k), (P*2^k+d)*2^m],
// so the weights along the path of X add up to f(X). Isomorphic nodes are not
// merged, so the diagram is valid but not minimal.
//
// The Cartesian-product function of a group is handled the same way on the
// concatenated index vector {SA, DA, SP, DP, PRT}: its value on each valid
// index combination is the highest rule of the group that matches, runs of
// equal value are numbered in order (the M1-monotone index) and the
// translation table maps each run number back to the rule.
package evmdd_host_pkg;
  import pc_pkg::*;

  typedef longint unsigned u64_t;
  typedef u64_t u64_q_t[$];

  typedef struct {
    int unsigned stage;
    u64_t        addr;
    u64_t        data;
  } lut_wr_t;

  typedef struct {
    logic       grp;
    wb_target_e tgt;
    int unsigned stage;
    u64_t       addr;
    u64_t       data;
  } host_wr_t;

  typedef struct {
    u64_t lo [5];
    u64_t hi [5];
    int unsigned rule;
  } tb_rule_t;

  localparam int unsigned FW [5] = '{SA_W, DA_W, SP_W, DP_W, PRT_W};

  // f(X) = number of start points <= X
  function automatic int unsigned step_value(const ref u64_t bnd[$], input u64_t x);
    int unsigned c = 0;
    foreach (bnd[i]) if (bnd[i] <= x) c++;
    return c;
  endfunction

  function automatic void sort_unique(ref u64_t q[$]);
    u64_t t;
    u64_t r[$];
    for (int i = 1; i < q.size(); i++)
      for (int j = i; j > 0 && q[j-1] > q[j]; j--) begin
        t = q[j]; q[j] = q[j-1]; q[j-1] = t;
      end
    foreach (q[i]) if (r.size() == 0 || r[r.size()-1] != q[i]) r.push_back(q[i]);
    q = r;
  endfunction

  // prefixes of m-bit-shifted start points that hold a start point strictly inside
  function automatic void live_prefixes(const ref u64_t bnd[$], input int unsigned m,
                                        ref u64_t q[$]);
    u64_t mask;
    q.delete();
    mask = (m >= 64) ? '1 : ((u64_t'(1) << m) - 1);
    foreach (bnd[i]) begin
      if ((bnd[i] & mask) != 0) begin
        u64_t p = bnd[i] >> m;
        if (q.size() == 0 || q[q.size()-1] != p) q.push_back(p);
      end
    end
  endfunction

  function automatic int unsigned count_in(const ref u64_t bnd[$], input u64_t lo, input u64_t hi);
    int unsigned c = 0;
    foreach (bnd[i]) if (bnd[i] > lo && bnd[i] <= hi) c++;
    return c;
  endfunction

  // node id of prefix p: its rank among the live prefixes, or q.size() for
  // the constant-zero node
  function automatic int unsigned find_id(const ref u64_t q[$], input u64_t p);
    foreach (q[i]) if (q[i] == p) return i;
    return q.size();
  endfunction

  // memory words of an evmdd_cascade #(N_IN=n, K=k, RAIL_W, IDX_W) for the
  // step function with sorted start points bnd; ok is cleared if it does not fit
  function automatic void build_cascade(input int unsigned n, input int unsigned k,
                                        input int unsigned rail_w, input int unsigned idx_w,
                                        const ref u64_t bnd[$], ref lut_wr_t wr[$],
                                        ref bit ok);
    int unsigned u, xp;
    u64_t prev[$];
    u64_t cur[$];
    u  = n_stages(n, k);
    xp = u * k;
    if (bnd.size() >= (1 << idx_w)) ok = 0;
    for (int unsigned j = 0; j < u; j++) begin
      int unsigned m    = xp - k * (j + 1);
      int unsigned rout = rail_out_w(j, u, k, rail_w);
      int unsigned nin;
      live_prefixes(bnd, m, cur);
      if (j + 1 < u && cur.size() + ((u64_t'(cur.size()) < (u64_t'(1) << (k * (j + 1)))) ? 1 : 0) > (1 << rout))
        ok = 0;
      // the constant node exists at level j-1 unless every prefix there is live
      nin = (j == 0) ? 1 : prev.size() + ((u64_t'(prev.size()) < (u64_t'(1) << (k * j))) ? 1 : 0);
      for (int unsigned id = 0; id < nin; id++) begin
        for (int unsigned d = 0; d < (1 << k); d++) begin
          lut_wr_t w;
          u64_t wt, child;
          w.stage = j;
          w.addr  = (j == 0) ? u64_t'(d) : ((u64_t'(id) << k) | d);
          if (j > 0 && id == prev.size()) begin
            wt = 0; child = cur.size();
          end else begin
            u64_t p  = (j == 0) ? 0 : prev[id];
            u64_t pc = (p << k) | d;
            wt    = count_in(bnd, p << (m + k), pc << m);
            child = find_id(cur, pc);
          end
          w.data = (child << idx_w) | wt;
          wr.push_back(w);
        end
      end
      prev = cur;
    end
  endfunction

  function automatic bit rule_hits(input tb_rule_t r, input u64_t v [5]);
    for (int f = 0; f < 5; f++) if (v[f] < r.lo[f] || v[f] > r.hi[f]) return 0;
    return 1;
  endfunction

  function automatic void hdr_fields(input header_t h, output u64_t v [5]);
    v[0] = h.sa; v[1] = h.da; v[2] = h.sp; v[3] = h.dp; v[4] = h.prt;
  endfunction

  // reference: highest rule of rs matching h, 0 (default) if none
  function automatic int unsigned classify(input tb_rule_t rs[$], input header_t h);
    u64_t v [5];
    int unsigned best = 0;
    hdr_fields(h, v);
    foreach (rs[i]) if (rule_hits(rs[i], v) && rs[i].rule > best) best = rs[i].rule;
    return best;
  endfunction

  function automatic int unsigned idx_of(const ref u64_t q[$], input u64_t v);
    foreach (q[i]) if (q[i] == v) return i;
    return q.size();
  endfunction

  // memory words of an mtmdd_cascade #(N_IN=n, K=k, RAIL_W, IDX_W) for the
  // same step function. Level j holds a node for every live prefix (ids in
  // ascending prefix order) and one constant node per distinct value reached
  // by a non-live prefix (next ids, ascending value); the last LUT stores
  // the value itself. ok is cleared if it does not fit.
  function automatic void build_mtmdd_cascade(input int unsigned n, input int unsigned k,
                                              input int unsigned rail_w, input int unsigned idx_w,
                                              const ref u64_t bnd[$], ref lut_wr_t wr[$],
                                              ref bit ok);
    int unsigned u, xp;
    u64_t prev_live[$], prev_const[$], cur_live[$], cur_const[$];
    u  = n_stages(n, k);
    xp = u * k;
    if (bnd.size() >= (1 << idx_w)) ok = 0;
    prev_live.push_back(0);                 // the root counts as a live node
    for (int unsigned j = 0; j < u; j++) begin
      int unsigned m, rout, nl;
      m    = xp - k * (j + 1);
      rout = rail_out_w(j, u, k, rail_w);
      live_prefixes(bnd, m, cur_live);
      cur_const = prev_const;
      foreach (prev_live[i])
        for (int unsigned d = 0; d < (1 << k); d++) begin
          u64_t pc;
          pc = (prev_live[i] << k) | d;
          if (find_id(cur_live, pc) == cur_live.size())
            cur_const.push_back(u64_t'(step_value(bnd, pc << m)));
        end
      sort_unique(cur_const);
      nl = cur_live.size();
      if (j + 1 < u && nl + cur_const.size() > (1 << rout)) ok = 0;
      for (int unsigned id = 0; id < prev_live.size() + prev_const.size(); id++)
        for (int unsigned d = 0; d < (1 << k); d++) begin
          lut_wr_t w;
          u64_t v, child;
          w.stage = j;
          w.addr  = (j == 0) ? u64_t'(d) : ((u64_t'(id) << k) | d);
          if (id < prev_live.size()) begin
            u64_t pc;
            pc = (prev_live[id] << k) | d;
            v  = u64_t'(step_value(bnd, pc << m));
            child = (find_id(cur_live, pc) < nl) ? u64_t'(find_id(cur_live, pc))
                                                 : u64_t'(nl + idx_of(cur_const, v));
          end else begin
            v     = prev_const[id - prev_live.size()];
            child = u64_t'(nl + idx_of(cur_const, v));
          end
          w.data = (j + 1 == u) ? v : child;
          wr.push_back(w);
        end
      prev_live  = cur_live;
      prev_const = cur_const;
    end
  endfunction

  // all memory writes for one group_classifier holding the rules rs
  function automatic void build_group(input logic grp, input int unsigned k,
                                      input int unsigned idx_w [5],
                                      input int unsigned cp_rail_w, input int unsigned cp_idx_w,
                                      input tb_rule_t rs[$], ref host_wr_t hw[$],
                                      ref bit ok);
    u64_t bnd [5][$];
    u64_t cpb[$];
    int unsigned trans[$];
    int unsigned cnt [5];
    int unsigned cp_in;
    int unsigned idx [5];
    u64_t rep [5];
    int unsigned prev_g;
    bit first;
    wb_target_e tg [5];
    tg    = '{TGT_SA, TGT_DA, TGT_SP, TGT_DP, TGT_PRT};
    first = 1;
    cp_in = idx_w[0] + idx_w[1] + idx_w[2] + idx_w[3] + idx_w[4];

    for (int f = 0; f < 5; f++) begin
      foreach (rs[i]) begin
        if (rs[i].lo[f] > 0) bnd[f].push_back(rs[i].lo[f]);
        if (rs[i].hi[f] < ((u64_t'(1) << FW[f]) - 1)) bnd[f].push_back(rs[i].hi[f] + 1);
      end
      sort_unique(bnd[f]);
      cnt[f] = bnd[f].size() + 1;
      begin
        lut_wr_t wr[$];
        build_cascade(FW[f], k, idx_w[f], idx_w[f], bnd[f], wr, ok);
        foreach (wr[i]) hw.push_back('{grp, tg[f], wr[i].stage, wr[i].addr, wr[i].data});
      end
    end

    // Cartesian product function over all valid index combinations, SA outermost
    for (int i0 = 0; i0 < cnt[0]; i0++)
    for (int i1 = 0; i1 < cnt[1]; i1++)
    for (int i2 = 0; i2 < cnt[2]; i2++)
    for (int i3 = 0; i3 < cnt[3]; i3++)
    for (int i4 = 0; i4 < cnt[4]; i4++) begin
      int unsigned g = 0;
      u64_t y = 0;
      idx = '{i0, i1, i2, i3, i4};
      for (int f = 0; f < 5; f++) begin
        rep[f] = (idx[f] == 0) ? 0 : bnd[f][idx[f]-1];
        y = (y << idx_w[f]) | idx[f];
      end
      foreach (rs[i]) if (rule_hits(rs[i], rep) && rs[i].rule > g) g = rs[i].rule;
      if (first) begin
        trans.push_back(g);
        first = 0;
      end else if (g != prev_g) begin
        cpb.push_back(y);
        trans.push_back(g);
      end
      prev_g = g;
    end
    begin
      lut_wr_t wr[$];
      build_cascade(cp_in, k, cp_rail_w, cp_idx_w, cpb, wr, ok);
      foreach (wr[i]) hw.push_back('{grp, TGT_CP, wr[i].stage, wr[i].addr, wr[i].data});
    end
    foreach (trans[i]) hw.push_back('{grp, TGT_TRANS, 0, u64_t'(i), u64_t'(trans[i])});
  endfunction

  // a random rule; prefixes for SA/DA, ranges for SP/DP, exact or any for PRT
  function automatic tb_rule_t random_rule(input int unsigned rule);
    tb_rule_t r;
    for (int f = 0; f < 2; f++) begin
      int unsigned plen = $urandom_range(0, 4) * 4;
      u64_t base = u64_t'($urandom);
      u64_t span = (u64_t'(1) << (32 - plen)) - 1;
      r.lo[f] = base & ~span & 64'hFFFF_FFFF;
      r.hi[f] = r.lo[f] | span;
    end
    for (int f = 2; f < 4; f++) begin
      if ($urandom_range(0, 2) == 0) begin
        r.lo[f] = 0; r.hi[f] = 16'hFFFF;
      end else begin
        u64_t a = $urandom_range(0, 4000);
        r.lo[f] = a; r.hi[f] = a + $urandom_range(0, 3000);
      end
    end
    if ($urandom_range(0, 1) == 0) begin
      r.lo[4] = 0; r.hi[4] = 255;
    end else begin
      r.lo[4] = ($urandom_range(0, 2) == 0) ? 1 : (($urandom_range(0, 1) == 0) ? 6 : 17);
      r.hi[4] = r.lo[4];
    end
    r.rule = rule;
    return r;
  endfunction

  // a header that hits rule r when hit = 1, otherwise an arbitrary header
  function automatic header_t random_header(input tb_rule_t rs[$], input bit hit);
    header_t h;
    u64_t v [5];
    if (hit && rs.size() > 0) begin
      int unsigned i = $urandom_range(0, rs.size() - 1);
      for (int f = 0; f < 5; f++) begin
        u64_t span = rs[i].hi[f] - rs[i].lo[f];
        u64_t off  = (span >= 64'hFFFF_FFFF) ? u64_t'($urandom)
                                             : u64_t'($urandom) % (span + 1);
        v[f] = rs[i].lo[f] + off;
      end
    end else begin
      v[0] = $urandom; v[1] = $urandom; v[2] = $urandom_range(0, 65535);
      v[3] = $urandom_range(0, 65535); v[4] = $urandom_range(0, 255);
    end
    h.sa = v[0][31:0]; h.da = v[1][31:0]; h.sp = v[2][15:0]; h.dp = v[3][15:0];
    h.prt = v[4][7:0];
    return h;
  endfunction

endpackage
