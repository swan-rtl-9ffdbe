// swan_map_pkg - configuration builder and reference model for testbenches.
//
// Plays the trusted party that configures a SWAN fabric after manufacture.
// It maps a small example of security-critical logic, a privilege-register
// update with a configuration-dependent side-channel output, onto a fabric
// with the default block sets (0: AO21, 1: OA21, 2: MUX2 camouflaged,
// 3: XOR2), picking the physical copy of every logical block and flop at
// random. Every unused copy becomes a canary: the spare copies of a set form
// one canary stage whose copies all get identical inputs (the previous
// stage's first copy and LFSR bits), and comparators check every copy of a
// stage against its first copy.
//
// Example netlist (pin bits: 0 trap, 1 mret, 2 mpp, 3 en):
//   set 0 AO21  t    = (mret & mpp) | trap      new privilege on an event
//   set 1 OA21  ev   = (trap | mret) & en       privilege update event
//   set 2 MUX2  d    = ev ? t : priv            next privilege (secure)
//   flop        priv <= d
//   set 3 XOR2  side = priv ^ K                 K = configuration constant
//   pout = {t, ev, side, priv}
package swan_map_pkg;

  typedef logic [4095:0] cfg_t;

  // Reference model of the example netlist.
  function automatic logic [3:0] ref_out(logic [7:0] pin, logic priv, logic k);
    logic t, ev;
    t  = (pin[1] & pin[2]) | pin[0];
    ev = (pin[0] | pin[1]) & pin[3];
    return {t, ev, priv ^ k, priv};
  endfunction
  function automatic logic ref_next(logic [7:0] pin, logic priv);
    logic t, ev;
    t  = (pin[1] & pin[2]) | pin[0];
    ev = (pin[0] | pin[1]) & pin[3];
    return ev ? t : priv;
  endfunction

  class swan_mapper;
    int n_in, lfsr_w, n_reg, n_out, n_chk, n_blk, n_src, sel_w;
    int size[4];
    int first[4];
    int perm[4][$];        // physical copies of each set, used copy first
    int rperm[$];          // flops, used flop first
    bit k;                 // side-channel constant
    int n_cmp;
    int cmp_set[$];        // comparator k watches set cmp_set[k] (4 = flops)
    int cmp_a[$];          // physical copy of operand a
    int cmp_b[$];          // physical copy of operand b
    cfg_t cfg;

    function new(int n_in_, int lfsr_w_, int n_reg_, int n_out_, int n_chk_,
                 int mappings, int secure_mappings, logic [3:0] secure_sets);
      n_in = n_in_; lfsr_w = lfsr_w_; n_reg = n_reg_; n_out = n_out_; n_chk = n_chk_;
      n_blk = 0;
      for (int s = 0; s < 4; s++) begin
        size[s]  = secure_sets[s] ? secure_mappings : mappings;
        first[s] = n_blk;
        n_blk   += size[s];
      end
      n_src = 2 + n_in + lfsr_w + n_reg + n_blk;
      sel_w = $clog2(n_src);
    endfunction

    function int s_pin(int i);   return 2 + i; endfunction
    function int s_lfsr(int j);  return 2 + n_in + (j % lfsr_w); endfunction
    function int s_reg(int r);   return 2 + n_in + lfsr_w + r; endfunction
    function int s_blk(int s, int p); return 2 + n_in + lfsr_w + n_reg + first[s] + p; endfunction

    function void put(int sel_idx, int val);
      for (int i = 0; i < sel_w; i++) cfg[sel_idx * sel_w + i] = val[i];
    endfunction
    function void blk(int s, int p, int a, int b, int c);
      int g;
      g = first[s] + p;
      put(3 * g, a); put(3 * g + 1, b); put(3 * g + 2, c);
    endfunction
    function void add_cmp(int s, int pa, int pb, int src_a, int src_b);
      int base;
      base = 3 * n_blk + n_reg + n_out;
      if (n_cmp >= n_chk) $fatal(1, "mapper: not enough comparators");
      put(base + 2 * n_cmp, src_a);
      put(base + 2 * n_cmp + 1, src_b);
      cfg[(base + 2 * n_chk) * sel_w + n_cmp] = 1'b1;
      cmp_set.push_back(s); cmp_a.push_back(pa); cmp_b.push_back(pb);
      n_cmp++;
    endfunction

    static function void shuffle(ref int q[$], input int n, input int want_first);
      int j, tmp;
      q.delete();
      for (int i = 0; i < n; i++) q.push_back(i);
      for (int i = n - 1; i > 0; i--) begin
        j = int'($urandom % (i + 1));
        tmp = q[i]; q[i] = q[j]; q[j] = tmp;
      end
      if (want_first >= 0) begin
        for (int i = 0; i < n; i++) if (q[i] == want_first) begin q[i] = q[0]; q[0] = want_first; end
      end
    endfunction

    // Build one random configuration. loc2 >= 0 pins the secure MUX to that
    // copy, k_sel >= 0 pins the side-channel constant.
    function void build(int loc2 = -1, int k_sel = -1);
      int prev, u0;
      cfg = '0;
      n_cmp = 0;
      cmp_set.delete(); cmp_a.delete(); cmp_b.delete();
      for (int s = 0; s < 4; s++) shuffle(perm[s], size[s], (s == 2) ? loc2 : -1);
      shuffle(rperm, n_reg, -1);
      k = (k_sel >= 0) ? k_sel[0] : $urandom_range(0, 1) != 0;
      // the protected logic
      blk(0, perm[0][0], s_pin(1), s_pin(2), s_pin(0));
      blk(1, perm[1][0], s_pin(0), s_pin(1), s_pin(3));
      blk(2, perm[2][0], s_reg(rperm[0]), s_blk(0, perm[0][0]), s_blk(1, perm[1][0]));
      blk(3, perm[3][0], s_reg(rperm[0]), k ? 1 : 0, 0);
      put(3 * n_blk + rperm[0], s_blk(2, perm[2][0]));
      put(3 * n_blk + n_reg + 0, s_reg(rperm[0]));
      put(3 * n_blk + n_reg + 1, s_blk(3, perm[3][0]));
      put(3 * n_blk + n_reg + 2, s_blk(1, perm[1][0]));
      put(3 * n_blk + n_reg + 3, s_blk(0, perm[0][0]));
      // canary chain through the spare copies, driven by the LFSR
      prev = -1;
      for (int s = 0; s < 4; s++) begin
        if (perm[s].size() > 1) begin
          for (int j = 1; j < perm[s].size(); j++)
            blk(s, perm[s][j], (prev >= 0) ? prev : s_lfsr(s), s_lfsr(s + 3), s_lfsr(s + 5));
          u0 = perm[s][1];
          for (int j = 2; j < perm[s].size(); j++)
            add_cmp(s, u0, perm[s][j], s_blk(s, u0), s_blk(s, perm[s][j]));
          prev = s_blk(s, u0);
        end
      end
      if (n_reg > 1) begin
        for (int j = 1; j < n_reg; j++) put(3 * n_blk + rperm[j], (prev >= 0) ? prev : s_lfsr(0));
        for (int j = 2; j < n_reg; j++)
          add_cmp(4, rperm[1], rperm[j], s_reg(rperm[1]), s_reg(rperm[j]));
      end
    endfunction

    // Comparators that watch physical copy p of set s.
    function logic [63:0] cmps_on(int s, int p);
      logic [63:0] m;
      m = '0;
      for (int i = 0; i < n_cmp; i++)
        if (cmp_set[i] == s && (cmp_a[i] == p || cmp_b[i] == p)) m[i] = 1'b1;
      return m;
    endfunction
  endclass

endpackage
