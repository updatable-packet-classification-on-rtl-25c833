// Testbench for kt_node_searcher (5 units, depth limit 3).
// A small tree is held in a testbench memory with one-cycle reads: a root
// selecting SA[31], DA[31], DP[15], one intermediate child selecting SA[30],
// SP[0], proto[0], leaves, empty nodes, and a chain deeper than the limit.
// Random packets and rule updates are sent with random output back-pressure;
// each result is compared with a reference walk of the same tree (leaf or
// empty node reached, first rule address, parent node, kicked-out updates).
// The latency of a lone job (one cycle to accept, two per level) is checked.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_node_searcher;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, rd_en, out_valid, out_ready, busy;
  ns_job_t in_job;
  logic [NODE_AW-1:0] rd_addr;
  node_t rd_data;
  ns_out_t out;
  int checks = 0, failures = 0;

  kt_node_searcher #(.NS_UNITS(5), .MAX_DEPTH(3)) dut (.*);
  always #5 clk = ~clk;

  // tree description kept by the testbench
  node_t mem [32];
  int    tf [32][3];
  int    tp [32][3];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr[4:0]];

  function automatic void set_inner(int a, int child, int f2, int p2, int f1,
                                    int p1, int f0, int p0);
    mem[a] = '0;
    mem[a].node_valid = 1; mem[a].addr = RULE_AW'(child);
    tf[a] = '{f0, f1, f2}; tp[a] = '{p0, p1, p2};
    mem[a].sel[2] = mk_sel(f2, p2); mem[a].sel[1] = mk_sel(f1, p1);
    mem[a].sel[0] = mk_sel(f0, p0);
  endfunction

  // reference walk: returns hit, fail, node reached, parent
  typedef struct { bit hit; bit fail; int leaf; int parent; bit pvalid; } walk_t;
  function automatic walk_t ref_walk(header_t h, bit is_upd, ranges_t r);
    walk_t w;
    int a = 0, lvl = 0;
    w = '{0, 0, 0, 0, 0};
    forever begin
      w.leaf = a;
      if (!mem[a].node_valid) return w;
      if (mem[a].is_leaf) begin w.hit = 1; return w; end
      if (is_upd) begin
        bit ok = 1;
        for (int i = 0; i < 3; i++)
          if (tf[a][i] >= 0 && !ref_fixed(r, tf[a][i], tp[a][i])) ok = 0;
        if (!ok) begin w.fail = 1; return w; end
      end
      if (lvl + 1 > 3) begin w.fail = 1; return w; end
      begin
        int idx = 0;
        for (int i = 2; i >= 0; i--)
          idx = idx * 2 + ((tf[a][i] >= 0) ? int'(hdr_bit(h, tf[a][i], tp[a][i])) : 0);
        w.parent = a; w.pvalid = 1;
        a = int'(mem[a].addr) + idx; lvl++;
      end
    end
  endfunction

  walk_t   exp_w [int];
  int      seen  [int];
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int nres = 0, nhit = 0, nfail = 0, nmiss = 0;
  int cyc = 0;
  int acc_cyc [int];
  int done_cyc [int];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    walk_t w;
    int id;
    id = int'(out.pkt_id);
    nres++;
    checks++;
    if (!exp_w.exists(id) || seen.exists(id)) begin
      failures++; $display("unexpected/duplicate id %0d", id);
    end else begin
      w = exp_w[id];
      seen[id] = 1;
      done_cyc[id] = cyc;
      if (out.hit != w.hit || out.fail != w.fail || int'(out.leaf_addr) != w.leaf ||
          (w.hit && out.leaf_node.addr != mem[w.leaf].addr) ||
          out.parent_valid != w.pvalid || (w.pvalid && int'(out.parent_addr) != w.parent)) begin
        failures++;
        $display("id %0d: hit %0d/%0d fail %0d/%0d leaf %0d/%0d parent %0d/%0d",
                 id, out.hit, w.hit, out.fail, w.fail, out.leaf_addr, w.leaf,
                 out.parent_addr, w.parent);
      end
      if (w.hit) nhit++; else if (w.fail) nfail++; else nmiss++;
    end
  end

  task automatic send(int id, bit is_upd, header_t h, ranges_t r);
    in_job = '0;
    in_job.pkt_id = PKT_ID_W'(id);
    in_job.is_upd = is_upd;
    in_job.hdr = is_upd ? lo_of(r) : h;
    in_job.upd.r = r;
    in_job.upd.op = OP_INSERT;
    exp_w[id] = ref_walk(in_job.hdr, is_upd, r);
    @(negedge clk);
    in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    acc_cyc[id] = cyc;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, lat;
    header_t h;
    for (int a = 0; a < 32; a++) begin
      mem[a] = '0; tf[a] = '{-1, -1, -1}; tp[a] = '{0, 0, 0};
    end
    set_inner(0, 1, 0, 31, 1, 31, 3, 15);         // root, children 1..8
    for (int k = 0; k < 8; k++) begin             // even: leaf, odd: empty
      if (k % 2 == 0) begin
        mem[1+k].is_leaf = 1; mem[1+k].node_valid = 1;
        mem[1+k].addr = RULE_AW'(100 + k);
      end
    end
    set_inner(6, 9, 0, 30, 2, 0, 4, 0);           // child 5: children 9..16
    for (int j = 9; j <= 16; j++) begin
      mem[j].is_leaf = 1; mem[j].node_valid = (j != 12);
      mem[j].addr = RULE_AW'(200 + j);
    end
    mem[10] = '0; mem[10].node_valid = 1; mem[10].addr = 17;  // chain
    mem[17] = '0; mem[17].node_valid = 1; mem[17].addr = 18;
    mem[18] = '0; mem[18].is_leaf = 1; mem[18].node_valid = 1; mem[18].addr = 300;
    in_valid = 0; in_job = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // latency of a lone packet reaching a leaf one level below the root
    h = rand_hdr(); h.sa[31] = 0; h.da[31] = 0; h.dp[15] = 0;  // child 0
    send(0, 0, h, '0);
    repeat (10) @(posedge clk);
    t0 = done_cyc[0] - acc_cyc[0];
    checks++;
    if (t0 != 5) begin failures++; $display("latency %0d, expected 5", t0); end
    repeat (3) @(posedge clk);

    // random traffic with back-pressure
    fork
      for (int i = 1; i <= 600; i++) begin
        ranges_t r;
        r = rand_ranges();
        if (i % 4 == 0) send(i, 1, h, r);
        else send(i, 0, rand_hdr(), r);
      end
      forever begin @(negedge clk); out_ready = $urandom_range(0, 2) != 0; end
    join_any
    wait (nres == 601);
    repeat (5) @(posedge clk);
    checks++;
    if (nhit == 0 || nfail == 0 || nmiss == 0) begin
      failures++; $display("coverage: hit %0d fail %0d miss %0d", nhit, nfail, nmiss);
    end
    $display("hit %0d fail %0d miss %0d", nhit, nfail, nmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
