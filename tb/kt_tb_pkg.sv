// kt_tb_pkg: stimulus generators and reference models shared by the
// classifier testbenches. The reference functions are written from the
// rule semantics (a packet matches when every field lies in the rule's
// range; the highest priority match wins) and do not use the design's
// helper functions.
//
// The models follow the published rule semantics (highest-priority match;
// first tree that can take a rule, else the linear PE); the tree shapes they
// assume are this testbench's own.
package kt_tb_pkg;
  import kt_pkg::*;

  function automatic logic [31:0] pfx_lo(logic [31:0] v, int len);
    logic [31:0] m;
    m = (len == 0) ? 32'd0 : ~((32'd1 << (32 - len)) - 32'd1);
    return v & m;
  endfunction

  function automatic logic [31:0] pfx_hi(logic [31:0] v, int len);
    logic [31:0] m;
    m = (len == 0) ? 32'd0 : ~((32'd1 << (32 - len)) - 32'd1);
    return v | ~m;
  endfunction

  // random rule in the style of ACL rules: address prefixes, port exact /
  // range / any, protocol exact or any
  function automatic ranges_t rand_ranges();
    ranges_t r;
    int      l;
    logic [31:0] v;
    logic [15:0] a, b;
    l = 8 + int'($urandom_range(0, 24)); v = $urandom();
    r.sa_lo = pfx_lo(v, l); r.sa_hi = pfx_hi(v, l);
    l = 4 + int'($urandom_range(0, 28)); v = $urandom();
    if ($urandom_range(0, 7) == 0) l = 0;
    r.da_lo = pfx_lo(v, l); r.da_hi = pfx_hi(v, l);
    r.sp_lo = 16'd0; r.sp_hi = 16'hffff;
    if ($urandom_range(0, 3) == 0) begin
      a = 16'($urandom()); r.sp_lo = a; r.sp_hi = a;
    end
    case ($urandom_range(0, 2))
      0: begin a = 16'($urandom()); r.dp_lo = a; r.dp_hi = a; end
      1: begin a = 16'($urandom()); b = 16'($urandom());
               r.dp_lo = (a < b) ? a : b; r.dp_hi = (a < b) ? b : a; end
      default: begin r.dp_lo = 16'd0; r.dp_hi = 16'hffff; end
    endcase
    if ($urandom_range(0, 1) == 0) begin r.pr_lo = 8'd6; r.pr_hi = 8'd6; end
    else begin r.pr_lo = 8'd0; r.pr_hi = 8'hff; end
    return r;
  endfunction

  // a header inside the given ranges
  function automatic header_t pick_in(ranges_t r);
    header_t h;
    h.sa    = r.sa_lo + ($urandom() % (r.sa_hi - r.sa_lo + 33'd1));
    h.da    = r.da_lo + ($urandom() % (r.da_hi - r.da_lo + 33'd1));
    h.sp    = r.sp_lo + 16'($urandom() % (32'(r.sp_hi - r.sp_lo) + 1));
    h.dp    = r.dp_lo + 16'($urandom() % (32'(r.dp_hi - r.dp_lo) + 1));
    h.proto = r.pr_lo + 8'($urandom() % (32'(r.pr_hi - r.pr_lo) + 1));
    return h;
  endfunction

  function automatic header_t rand_hdr();
    header_t h;
    h.sa = $urandom(); h.da = $urandom(); h.sp = 16'($urandom());
    h.dp = 16'($urandom()); h.proto = ($urandom_range(0, 1) == 0) ? 8'd6 : 8'd17;
    return h;
  endfunction

  function automatic bit ref_match(ranges_t r, header_t h);
    if (h.sa < r.sa_lo || h.sa > r.sa_hi) return 0;
    if (h.da < r.da_lo || h.da > r.da_hi) return 0;
    if (h.sp < r.sp_lo || h.sp > r.sp_hi) return 0;
    if (h.dp < r.dp_lo || h.dp > r.dp_hi) return 0;
    if (h.proto < r.pr_lo || h.proto > r.pr_hi) return 0;
    return 1;
  endfunction

  // bit 'pos' of field 'f' (0 SA, 1 DA, 2 SP, 3 DP, 4 proto)
  function automatic bit hdr_bit(header_t h, int f, int pos);
    case (f)
      0: return h.sa[pos];
      1: return h.da[pos];
      2: return h.sp[pos];
      3: return h.dp[pos];
      default: return h.proto[pos];
    endcase
  endfunction

  // a node selector from (field, bit position)
  function automatic bitsel_t mk_sel(int f, int pos);
    bitsel_t s;
    s.field = 3'(f);
    s.mask  = 32'd1 << pos;
    return s;
  endfunction

  // wildcard test written from the range: every value of the range has the
  // same bit 'pos' iff lo and hi share all bits from 'pos' upward
  function automatic bit ref_fixed(ranges_t r, int f, int pos);
    logic [31:0] lo, hi;
    case (f)
      0: begin lo = r.sa_lo; hi = r.sa_hi; end
      1: begin lo = r.da_lo; hi = r.da_hi; end
      2: begin lo = {16'd0, r.sp_lo}; hi = {16'd0, r.sp_hi}; end
      3: begin lo = {16'd0, r.dp_lo}; hi = {16'd0, r.dp_hi}; end
      default: begin lo = {24'd0, r.pr_lo}; hi = {24'd0, r.pr_hi}; end
    endcase
    return (lo >> pos) == (hi >> pos);
  endfunction

  function automatic header_t lo_of(ranges_t r);
    header_t h;
    h.sa = r.sa_lo; h.da = r.da_lo; h.sp = r.sp_lo; h.dp = r.dp_lo;
    h.proto = r.pr_lo;
    return h;
  endfunction

  // kt_tb_model: reference model of one classifier for the end-to-end
  // testbenches. Each tree is described only by its root's three selected
  // bits (the testbench loads roots with eight empty children); the model
  // places an inserted rule in the first tree where the rule is not a
  // wildcard at any root bit and the leaf holds fewer than binth rules, else
  // in the linear list while it has room, else the insert fails. Searches
  // return the highest-priority matching rule over all stored rules.
  class kt_tb_model;
    int ntrees, binth, lin_depth;
    int rf [][3];
    int rp [][3];
    int leaf_cnt [][8];
    kt_pkg::ranges_t rr [int];
    int pr [int];
    int where [int];      // id -> tree index, ntrees = linear list
    int leaf_of [int];
    int lin_used;

    function new(int ntrees, int binth, int lin_depth);
      this.ntrees = ntrees; this.binth = binth; this.lin_depth = lin_depth;
      rf = new[ntrees]; rp = new[ntrees]; leaf_cnt = new[ntrees];
      for (int t = 0; t < ntrees; t++) begin
        // tree t selects SA[31-t], DA[31-t] and, for t > 0, SP[15]; tree 0
        // uses protocol bit 0 instead, so wildcard-protocol rules skip it
        rf[t] = '{(t == 0) ? 4 : 2, 1, 0};
        rp[t] = '{(t == 0) ? 0 : 15, 31 - t, 31 - t};
        for (int l = 0; l < 8; l++) leaf_cnt[t][l] = 0;
      end
      lin_used = 0;
    endfunction

    function int leaf_idx(int t, kt_pkg::ranges_t r);
      kt_pkg::header_t h = lo_of(r);
      return 4 * int'(hdr_bit(h, rf[t][2], rp[t][2])) +
             2 * int'(hdr_bit(h, rf[t][1], rp[t][1])) +
             int'(hdr_bit(h, rf[t][0], rp[t][0]));
    endfunction

    // returns the tree index that takes the rule, ntrees for the linear
    // list, -1 for a failed insert
    function int insert(int id, kt_pkg::ranges_t r, int prio);
      for (int t = 0; t < ntrees; t++) begin
        bit ok = 1;
        int l;
        for (int i = 0; i < 3; i++) if (!ref_fixed(r, rf[t][i], rp[t][i])) ok = 0;
        if (!ok) continue;
        l = leaf_idx(t, r);
        if (leaf_cnt[t][l] >= binth) continue;
        leaf_cnt[t][l]++;
        rr[id] = r; pr[id] = prio; where[id] = t; leaf_of[id] = l;
        return t;
      end
      if (lin_used < lin_depth) begin
        lin_used++;
        rr[id] = r; pr[id] = prio; where[id] = ntrees;
        return ntrees;
      end
      return -1;
    endfunction

    function bit delete(int id);
      if (!where.exists(id)) return 0;
      if (where[id] == ntrees) lin_used--;
      else leaf_cnt[where[id]][leaf_of[id]]--;
      where.delete(id); rr.delete(id); pr.delete(id);
      return 1;
    endfunction

    function kt_pkg::sres_t search(kt_pkg::header_t h);
      kt_pkg::sres_t e = '0;
      foreach (where[id])
        if (ref_match(rr[id], h) && (!e.found || pr[id] > int'(e.prio))) begin
          e.found = 1; e.rule_id = kt_pkg::RULE_ID_W'(id); e.prio = kt_pkg::PRIO_W'(pr[id]);
        end
      return e;
    endfunction

    // a header inside a random stored rule, or a random header
    function kt_pkg::header_t pick();
      int k, id;
      if (where.size() == 0 || $urandom_range(0, 3) == 0) return rand_hdr();
      k = $urandom_range(0, where.size() - 1);
      void'(where.first(id));
      repeat (k) void'(where.next(id));
      return pick_in(rr[id]);
    endfunction

    function kt_pkg::node_t root(int t);
      kt_pkg::node_t n = '0;
      n.node_valid = 1; n.addr = 8;
      for (int i = 0; i < 3; i++) n.sel[i] = mk_sel(rf[t][i], rp[t][i]);
      return n;
    endfunction
  endclass
endpackage
