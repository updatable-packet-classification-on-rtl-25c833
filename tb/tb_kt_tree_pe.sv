// Testbench for kt_tree_pe at reduced size (node table 16 + 8 entries, rule
// table 64 + 16 entries, binth 4, 3 + 3 search units).
// The host loads a root that selects SA[31], DA[31] and proto[0] with its
// eight children (in the upper part of the node table) empty. Rules are then
// inserted and deleted through the update port one at a time, and packets are
// searched in bursts. A reference model of the tree decides whether each
// update must succeed here (rule not a wildcard at a root bit, leaf below
// binth; delete only of a rule present) and which rule each packet must
// find. Updates already marked successful must pass through the bypass FIFO
// unchanged.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_tree_pe;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  localparam int BINTH = 4;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, r_valid, r_ready;
  logic [PKT_ID_W-1:0] s_pkt_id;
  header_t s_hdr;
  sres_t r_res;
  logic u_in_valid, u_in_ready, u_out_valid, u_out_ready, byp_push, busy;
  upd_t u_in, u_out;
  cfg_t cfg;
  int checks = 0, failures = 0;

  kt_tree_pe #(.NODE_LAW(4), .NODE_UDEPTH(8), .RULE_LAW(6), .RULE_UDEPTH(16),
               .NS_UNITS(3), .RP_UNITS(3), .BINTH(BINTH), .MAX_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference tree: root fields/bits, rules per leaf
  int rf [3] = '{4, 1, 0};    // sel[0] proto, sel[1] DA, sel[2] SA
  int rp [3] = '{0, 31, 31};
  ranges_t rules [int];        // id -> ranges
  int      prio_of [int];
  int      leaf_of [int];      // id -> leaf index (only rules in the tree)
  int      leaf_cnt [8];

  function automatic int leaf_idx(ranges_t r);
    header_t h = lo_of(r);
    return 4 * int'(hdr_bit(h, rf[2], rp[2])) + 2 * int'(hdr_bit(h, rf[1], rp[1])) +
           int'(hdr_bit(h, rf[0], rp[0]));
  endfunction

  // ------------------------------------------------------------ streams
  task automatic cfg_write(cfg_tbl_e t, int addr, node_t n);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = t; cfg.addr = RULE_AW'(addr); cfg.node = n;
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic do_update(upd_t u, output upd_t res, output bit bypassed);
    int bp = 0;
    @(negedge clk);
    u_in = u; u_in_valid = 1; #1;
    while (!u_in_ready) begin @(negedge clk); #1; end
    @(posedge clk); bp = byp_push;
    @(negedge clk); u_in_valid = 0;
    while (!u_out_valid) begin @(negedge clk); end
    res = u_out; bypassed = bp;
    @(posedge clk);
  endtask

  // expected result per packet id
  sres_t exp_r [int];
  int nres = 0, nfound = 0;
  always @(posedge clk) if (rst_n && r_valid && r_ready) begin
    int id;
    id = int'(r_res.pkt_id);
    nres++;
    checks++;
    if (!exp_r.exists(id)) begin failures++; $display("unexpected id %0d", id); end
    else if (r_res.found != exp_r[id].found ||
             (r_res.found && r_res.rule_id != exp_r[id].rule_id)) begin
      failures++;
      $display("pkt %0d: found %0d/%0d rule %0d/%0d", id, r_res.found,
               exp_r[id].found, r_res.rule_id, exp_r[id].rule_id);
    end else if (r_res.found) nfound++;
    exp_r.delete(id);
  end

  int next_pkt = 0;
  task automatic search_burst(int n);
    int target = nres + n;
    for (int i = 0; i < n; i++) begin
      header_t h;
      sres_t e;
      if ($urandom_range(0, 3) != 0 && rules.size() > 0) begin
        int k = $urandom_range(0, rules.size() - 1);
        int id;
        void'(rules.first(id));
        repeat (k) void'(rules.next(id));
        h = pick_in(rules[id]);
      end else h = rand_hdr();
      e = '0;
      foreach (leaf_of[id])
        if (ref_match(rules[id], h) && (!e.found || prio_of[id] > int'(e.prio))) begin
          e.found = 1; e.rule_id = RULE_ID_W'(id); e.prio = PRIO_W'(prio_of[id]);
        end
      exp_r[next_pkt] = e;
      @(negedge clk);
      s_valid = 1; s_pkt_id = PKT_ID_W'(next_pkt); s_hdr = h; #1;
      while (!s_ready) begin @(negedge clk); #1; end
      @(negedge clk); s_valid = 0;
      next_pkt++;
    end
    wait (nres == target);
  endtask

  int n_ins_ok = 0, n_ins_kick = 0, n_ins_full = 0, n_del_ok = 0, n_del_miss = 0;
  task automatic insert_rule(int id);
    upd_t u, res;
    bit byp, expect_ok;
    int li;
    u = '0; u.op = OP_INSERT; u.res = RES_UPDATE_PENDING; u.id = RULE_ID_W'(id);
    u.prio = PRIO_W'((id * 7919) % 65521); u.r = rand_ranges();
    li = leaf_idx(u.r);
    expect_ok = 1;
    for (int i = 0; i < 3; i++) if (!ref_fixed(u.r, rf[i], rp[i])) expect_ok = 0;
    if (!expect_ok) n_ins_kick++;
    else if (leaf_cnt[li] >= BINTH) begin expect_ok = 0; n_ins_full++; end
    do_update(u, res, byp);
    checks++;
    if ((res.res == RES_UPDATE_SUCCESS) != expect_ok || res.id != u.id || byp) begin
      failures++; $display("insert %0d: res %0d expected ok=%0d", id, res.res, expect_ok);
    end
    rules[id] = u.r; prio_of[id] = int'(u.prio);
    if (expect_ok) begin leaf_of[id] = li; leaf_cnt[li]++; n_ins_ok++; end
  endtask

  task automatic delete_rule(int id);
    upd_t u, res;
    bit byp, expect_ok;
    u = '0; u.op = OP_DELETE; u.res = RES_UPDATE_PENDING; u.id = RULE_ID_W'(id);
    u.r = rules[id]; u.prio = PRIO_W'(prio_of[id]);
    expect_ok = leaf_of.exists(id);
    do_update(u, res, byp);
    checks++;
    if ((res.res == RES_UPDATE_SUCCESS) != expect_ok) begin
      failures++; $display("delete %0d: res %0d expected ok=%0d", id, res.res, expect_ok);
    end
    if (expect_ok) begin leaf_cnt[leaf_of[id]]--; leaf_of.delete(id); n_del_ok++; end
    else n_del_miss++;
    rules.delete(id); prio_of.delete(id);
  endtask

  initial begin
    node_t n;
    upd_t u, res;
    bit byp;
    int id;
    s_valid = 0; s_pkt_id = 0; s_hdr = '0; r_ready = 1; u_in_valid = 0;
    u_in = '0; u_out_ready = 1; cfg = '0;
    foreach (leaf_cnt[i]) leaf_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load: root at 0, children 16..23 empty, spare rules from 0
    n = '0; n.node_valid = 1; n.addr = 16;
    for (int i = 0; i < 3; i++) n.sel[i] = mk_sel(rf[i], rp[i]);
    cfg_write(CFG_NODE, 0, n);
    for (int a = 16; a < 24; a++) cfg_write(CFG_NODE, a, '0);
    cfg_write(CFG_SPARE, 0, '0);

    search_burst(20);                         // empty tree: nothing found
    for (int i = 1; i <= 60; i++) insert_rule(i);
    fork
      search_burst(300);
      forever begin @(negedge clk); r_ready = $urandom_range(0, 3) != 0; end
    join_any
    disable fork;
    r_ready = 1;
    for (int i = 0; i < 25; i++) delete_rule(1 + 2 * i);
    search_burst(300);
    for (int i = 61; i <= 100; i++) insert_rule(i);
    search_burst(300);
    // an update finished by an earlier PE must bypass the tree
    u = '0; u.op = OP_INSERT; u.res = RES_UPDATE_SUCCESS; u.id = 999; u.r = rand_ranges();
    do_update(u, res, byp);
    checks++;
    if (!byp || res != u) begin failures++; $display("bypass failed"); end
    search_burst(50);                         // rule 999 must not be in the tree

    $display("inserted %0d, kicked %0d, leaf full %0d, deleted %0d, delete misses %0d, found %0d",
             n_ins_ok, n_ins_kick, n_ins_full, n_del_ok, n_del_miss, nfound);
    checks++;
    if (n_ins_ok == 0 || n_ins_kick == 0 || n_ins_full == 0 || n_del_ok == 0 ||
        n_del_miss == 0 || nfound == 0) begin
      failures++; $display("a case was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
