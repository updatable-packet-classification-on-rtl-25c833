// Testbench for kt_rule_processor with its update engine (binth 6, 3 search
// units, 64 rule entries). The node and rule tables are testbench memories
// with one-cycle reads that take the block's writes. Eight leaves are used:
// four start with five-rule lists, four are empty. Traversal results are fed
// in directly: bursts of packet searches (checked against the best matching
// rule of the leaf's current rule set), and single inserts and deletes
// (checked for success against binth and presence). After every update the
// testbench walks the lists in its memories and compares them with the
// reference rule sets, so broken links, lost rules and wrong node rewrites
// are caught.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_rule_processor;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  localparam int BINTH = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, rd_en, rule_we, node_we, cfg_spare_we;
  logic res_valid, res_ready, upd_valid, upd_ready, busy;
  ns_out_t in;
  logic [RULE_AW-1:0] rd_addr, rule_waddr, cfg_spare_addr;
  logic [NODE_AW-1:0] node_waddr;
  rule_t rd_data, rule_wdata;
  node_t node_wdata;
  sres_t res;
  upd_t upd;
  int checks = 0, failures = 0;

  kt_rule_processor #(.RP_UNITS(3), .BINTH(BINTH), .RULE_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  rule_t rmem [64];
  node_t nmem [8];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= rmem[rd_addr[5:0]];
    if (rule_we) rmem[rule_waddr[5:0]] <= rule_wdata;
    if (node_we) nmem[node_waddr[2:0]] <= node_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ranges_t rr [int];
  int      pr [int];
  int      set [8][$];     // reference: rule ids of each leaf

  function automatic bit lists_ok();
    for (int l = 0; l < 8; l++) begin
      int got [$];
      int a;
      if (nmem[l].node_valid) begin
        a = int'(nmem[l].addr);
        for (int k = 0; k < 20; k++) begin
          got.push_back(int'(rmem[a].id));
          if (!rmem[a].next_valid) break;
          a = int'(rmem[a].next_addr);
        end
      end
      if (got.size() != set[l].size()) return 0;
      foreach (set[l][i]) begin
        int f [$];
        f = got.find_first_index(x) with (x == set[l][i]);
        if (f.size() == 0) return 0;
      end
    end
    return 1;
  endfunction

  sres_t exp_r [int];
  int nres = 0, nfound = 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    int id;
    id = int'(res.pkt_id);
    nres++;
    checks++;
    if (!exp_r.exists(id)) begin failures++; $display("unexpected id %0d", id); end
    else if (res.found != exp_r[id].found || (res.found && res.rule_id != exp_r[id].rule_id)) begin
      failures++; $display("pkt %0d: found %0d/%0d rule %0d/%0d", id, res.found,
                           exp_r[id].found, res.rule_id, exp_r[id].rule_id);
    end else if (res.found) nfound++;
  end

  task automatic feed(ns_out_t j);
    @(negedge clk);
    in = j; in_valid = 1; #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk); in_valid = 0;
  endtask

  function automatic ns_out_t job_for(int leaf);
    ns_out_t j = '0;
    j.leaf_addr = NODE_AW'(leaf);
    j.leaf_node = nmem[leaf];
    j.hit = nmem[leaf].node_valid;
    return j;
  endfunction

  int pkt = 0;
  task automatic search_burst(int n);
    int target = nres + n;
    for (int i = 0; i < n; i++) begin
      int l = $urandom_range(0, 7);
      ns_out_t j = job_for(l);
      sres_t e = '0;
      if (set[l].size() > 0 && $urandom_range(0, 3) != 0)
        j.hdr = pick_in(rr[set[l][$urandom_range(0, set[l].size() - 1)]]);
      else j.hdr = rand_hdr();
      j.pkt_id = PKT_ID_W'(pkt);
      foreach (set[l][k])
        if (ref_match(rr[set[l][k]], j.hdr) && (!e.found || pr[set[l][k]] > int'(e.prio))) begin
          e.found = 1; e.rule_id = RULE_ID_W'(set[l][k]); e.prio = PRIO_W'(pr[set[l][k]]);
        end
      exp_r[pkt] = e;
      pkt++;
      feed(j);
    end
    wait (nres == target);
  endtask

  int n_ok = 0, n_full = 0, n_del = 0, n_miss = 0;
  task automatic update(op_e op, int l, int id);
    ns_out_t j = job_for(l);
    bit exp_ok;
    int f [$];
    j.is_upd = 1; j.upd.op = op; j.upd.res = RES_UPDATE_PENDING;
    j.upd.id = RULE_ID_W'(id);
    if (op == OP_INSERT) begin
      rr[id] = rand_ranges(); pr[id] = (id * 7919) % 65521;
      if (id % 3 == 0) begin      // match-all rule: packets then match several
        rr[id].sa_lo = '0; rr[id].sa_hi = '1; rr[id].da_lo = '0; rr[id].da_hi = '1;
        rr[id].sp_lo = '0; rr[id].sp_hi = '1; rr[id].dp_lo = '0; rr[id].dp_hi = '1;
        rr[id].pr_lo = '0; rr[id].pr_hi = '1;
      end
      j.upd.r = rr[id]; j.upd.prio = PRIO_W'(pr[id]);
      exp_ok = set[l].size() < BINTH;
    end else begin
      f = set[l].find_first_index(x) with (x == id);
      exp_ok = f.size() > 0;
    end
    feed(j);
    while (!upd_valid) @(negedge clk);
    checks++;
    if ((upd.res == RES_UPDATE_SUCCESS) != exp_ok || upd.id != RULE_ID_W'(id)) begin
      failures++; $display("update op %0d leaf %0d id %0d: res %0d exp ok %0d", op, l, id, upd.res, exp_ok);
    end
    @(negedge clk);
    if (exp_ok) begin
      if (op == OP_INSERT) begin set[l].push_back(id); n_ok++; end
      else begin set[l].delete(f[0]); n_del++; end
    end else if (op == OP_INSERT) n_full++; else n_miss++;
    checks++;
    if (!lists_ok()) begin failures++; $display("lists differ after update of %0d", id); end
  endtask

  initial begin
    in_valid = 0; in = '0; res_ready = 1; upd_ready = 1;
    cfg_spare_we = 0; cfg_spare_addr = 0;
    for (int a = 0; a < 64; a++) rmem[a] = '0;
    for (int l = 0; l < 8; l++) nmem[l] = '0;
    // leaves 0..3: five rules each at entries 5l..5l+4, linked in order
    for (int l = 0; l < 4; l++) begin
      nmem[l].is_leaf = 1; nmem[l].node_valid = 1; nmem[l].addr = RULE_AW'(5 * l);
      for (int k = 0; k < 5; k++) begin
        int id, a;
        id = 100 + 5 * l + k; a = 5 * l + k;
        rr[id] = rand_ranges(); pr[id] = (id * 7919) % 65521;
        rmem[a].id = RULE_ID_W'(id); rmem[a].prio = PRIO_W'(pr[id]); rmem[a].r = rr[id];
        rmem[a].next_valid = (k < 4); rmem[a].next_addr = RULE_AW'(a + 1);
        set[l].push_back(id);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_spare_we = 1; cfg_spare_addr = 20;
    @(negedge clk); cfg_spare_we = 0;
    checks++;
    if (!lists_ok()) failures++;

    fork
      search_burst(200);
      forever begin @(negedge clk); res_ready = $urandom_range(0, 3) != 0; end
    join_any
    disable fork;
    res_ready = 1;
    for (int i = 0; i < 40; i++) update(OP_INSERT, $urandom_range(0, 7), 200 + i);
    search_burst(200);
    for (int i = 0; i < 40; i++) begin
      int l, id;
      l = $urandom_range(0, 7);
      id = (set[l].size() > 0 && i % 4 != 0) ? set[l][$urandom_range(0, set[l].size() - 1)] : 999;
      update(OP_DELETE, l, id);
    end
    search_burst(200);
    for (int i = 0; i < 30; i++) update(OP_INSERT, $urandom_range(0, 7), 300 + i);
    search_burst(200);
    $display("inserts %0d full %0d deletes %0d misses %0d found %0d", n_ok, n_full, n_del, n_miss, nfound);
    checks++;
    if (n_ok == 0 || n_full == 0 || n_del == 0 || n_miss == 0 || nfound == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
