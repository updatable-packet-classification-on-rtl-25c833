// Full-size end-to-end testbench for kt_top: the top is instantiated with
// its default parameters (6 cores of 10 tree PEs plus a linear PE each, the
// table sizes of the package defaults). Every core gets its own driver and
// its own reference model (kt_tb_model): the host bus loads each core's ten
// tree roots one core at a time, then all cores run at once, inserting
// random rules through their update ports, searching pipelined packet bursts
// under random and bursty result back-pressure, and inserting and deleting
// rules while packets are in flight, and finally search again with the
// linear PE's rules deleted. Cores 3 to 5 only get rules that fit a tree,
// so their packets are not paced by a linear scan. Every update result and packet result
// is checked against the core's model.
// Mechanisms counted over all cores, each of which must be seen: an update
// passing a tree through its bypass FIFO, an insert landing in the linear PE,
// an update waiting for in-flight packets (mode switch), a packet waiting for
// an update, a packet stalled by the in-flight limit, a result resolver
// balancer holding a channel, and both found and not-found results. An
// insert failing everywhere needs the 1024-entry linear PE full and is
// exercised by tb_kt_classifier at reduced size instead.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_top;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  localparam int NC = 6, NT = 10, BINTH = 10, LIN = 1024;

  logic clk = 0, rst_n = 0;
  logic    [NC-1:0] s_valid, s_ready, r_valid, r_ready, u_valid, u_ready, ur_valid, ur_ready;
  header_t [NC-1:0] s_hdr;
  sres_t   [NC-1:0] r_res;
  res_e    [NC-1:0] r_code;
  upd_t    [NC-1:0] u_cmd, ur_res;
  cfg_t cfg;
  logic [3:0] cfg_core;
  logic [4:0] cfg_pe;
  logic [NC-1:0] upd_mode, throttled;
  logic [NC-1:0][NT:0] byp_push;
  int checks = 0, failures = 0;

  kt_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cfg_turn = 0;   // which core's driver owns the host bus
  int done = 0;       // drivers finished

  // mechanism counters, summed over cores
  int n_bypass = 0, n_throttle = 0, n_upd_wait = 0, n_pkt_wait = 0, n_cap = 0;
  int n_linear = 0, n_found = 0, n_miss = 0;

  for (genvar c = 0; c < NC; c++) begin : g_drv
    kt_tb_model m;
    sres_t exp_q [$];
    int nres = 0;
    logic bp_burst = 0;   // set while this core's results are held back

    int inflight = 0;     // packets accepted whose result has not left
    always @(posedge clk) if (rst_n) begin
      inflight += int'(s_valid[c] && s_ready[c]) - int'(r_valid[c] && r_ready[c]);
    end

    always @(posedge clk) if (rst_n) begin
      n_bypass += $countones(byp_push[c]);
      if (throttled[c]) n_throttle++;
      if (u_valid[c] && !u_ready[c] && inflight != 0) n_upd_wait++;
      if (s_valid[c] && !s_ready[c] && (upd_mode[c] || u_valid[c])) n_pkt_wait++;
      if (s_valid[c] && !s_ready[c] && inflight == 64) n_cap++;
    end

    always @(posedge clk) if (rst_n && r_valid[c] && r_ready[c]) begin
      sres_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("core %0d: unexpected result", c); end
      else begin
        e = exp_q.pop_front();
        if (r_res[c].found != e.found || (e.found && r_res[c].rule_id != e.rule_id) ||
            r_code[c] != (e.found ? RES_RULE_FOUND : RES_RULE_NOT_FOUND)) begin
          failures++;
          $display("core %0d packet %0d: found %0d/%0d rule %0d/%0d", c, nres,
                   r_res[c].found, e.found, r_res[c].rule_id, e.rule_id);
        end
        if (e.found) n_found++; else n_miss++;
      end
      nres++;
    end

    task automatic cfg_node(int pe, int addr, node_t n);
      @(negedge clk);
      cfg = '0; cfg.we = 1; cfg.tbl = CFG_NODE; cfg.addr = RULE_AW'(addr); cfg.node = n;
      cfg_core = 4'(c); cfg_pe = 5'(pe);
      @(negedge clk); cfg = '0;
    endtask

    task automatic search(int n);
      for (int i = 0; i < n; i++) begin
        header_t h;
        h = m.pick();
        @(negedge clk);
        s_valid[c] = 1; s_hdr[c] = h; #1;
        while (!s_ready[c]) begin @(negedge clk); #1; end
        exp_q.push_back(m.search(h));
      end
      @(posedge clk); #1;
      s_valid[c] = 0;
    endtask

    task automatic update(op_e op, int id);
      upd_t u;
      int exp_where;
      bit exp_ok;
      u = '0; u.op = op; u.id = RULE_ID_W'(id); u.res = RES_UPDATE_PENDING;
      u.prio = PRIO_W'((id * 7919) % 65521);
      if (op == OP_INSERT) begin
        u.r = rand_ranges();
        if (c >= NC / 2) begin
          // cores 3..5 take only rules that some tree can hold (protocol,
          // source port and destination prefix fixed), so their linear PE
          // stays empty and packets are paced by the trees alone
          u.r.pr_lo = 8'd6; u.r.pr_hi = 8'd6;
          u.r.sp_hi = u.r.sp_lo;
          if (u.r.da_lo == 32'd0 && u.r.da_hi == 32'hffffffff) u.r.da_hi = 32'd0;
        end
        exp_where = m.insert(id, u.r, int'(u.prio));
        exp_ok = exp_where >= 0;
        if (exp_where == NT) n_linear++;
      end else begin
        if (m.rr.exists(id)) u.r = m.rr[id];
        exp_ok = m.delete(id);
      end
      @(negedge clk);
      u_cmd[c] = u; u_valid[c] = 1; #1;
      while (!u_ready[c]) begin @(negedge clk); #1; end
      @(posedge clk); #1;
      u_valid[c] = 0;
      while (!ur_valid[c]) @(negedge clk);
      checks++;
      if (ur_res[c].id != u.id ||
          ur_res[c].res != (exp_ok ? RES_UPDATE_SUCCESS : RES_UPDATE_FAILURE)) begin
        failures++;
        $display("core %0d update op %0d id %0d: res %0d expected ok %0d",
                 c, op, id, ur_res[c].res, exp_ok);
      end
      @(posedge clk);
    endtask

    initial begin
      int next_id;
      next_id = 1;
      m = new(NT, BINTH, LIN);
      s_valid[c] = 0; s_hdr[c] = '0; r_ready[c] = 1; u_valid[c] = 0; u_cmd[c] = '0;
      ur_ready[c] = 1;
      wait (rst_n && cfg_turn == c);
      for (int t = 0; t < NT; t++) cfg_node(t, 0, m.root(t));
      cfg_turn++;
      wait (cfg_turn == NC);
      search(20);
      wait (nres == 20);
      for (int i = 0; i < 80 + 10 * c; i++) begin update(OP_INSERT, next_id); next_id++; end
      fork
        search(300);
        forever begin                 // random back-pressure with long holds
          @(negedge clk);
          if ($urandom_range(0, 99) == 0) begin
            r_ready[c] = 0; bp_burst = 1;
            repeat ($urandom_range(40, 120)) @(negedge clk);
            bp_burst = 0;
          end
          r_ready[c] = $urandom_range(0, 3) != 0;
        end
        begin                         // updates arriving while packets fly
          repeat (200) @(posedge clk);
          update(OP_DELETE, 3);
          repeat (200) @(posedge clk);
          update(OP_INSERT, next_id); next_id++;
        end
      join_any
      wait (nres == 320);
      disable fork;
      r_ready[c] = 1;
      for (int i = 0; i < 20; i++) update(OP_DELETE, $urandom_range(1, next_id));
      search(150);
      wait (nres == 470);
      // empty the linear PE so packets are no longer paced by its scan:
      // the in-flight limit and the balancers come into play
      begin
        int lin_ids [$];
        foreach (m.where[id]) if (m.where[id] == NT) lin_ids.push_back(id);
        foreach (lin_ids[i]) update(OP_DELETE, lin_ids[i]);
      end
      fork
        search(400);
        forever begin
          @(negedge clk);
          if ($urandom_range(0, 49) == 0) begin
            r_ready[c] = 0; bp_burst = 1;
            repeat ($urandom_range(100, 250)) @(negedge clk);
            bp_burst = 0;
          end
          r_ready[c] = 1;
        end
      join_any
      wait (nres == 870);
      disable fork;
      r_ready[c] = 1;
      done++;
    end
  end

  initial begin
    cfg = '0; cfg_core = 0; cfg_pe = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == NC);
    repeat (10) @(posedge clk);
    $display("bypass %0d throttle %0d upd_wait %0d pkt_wait %0d cap %0d linear %0d found %0d miss %0d",
             n_bypass, n_throttle, n_upd_wait, n_pkt_wait, n_cap, n_linear, n_found, n_miss);
    checks++;
    if (n_bypass == 0 || n_throttle == 0 || n_upd_wait == 0 || n_pkt_wait == 0 ||
        n_cap == 0 || n_linear == 0 || n_found == 0 || n_miss == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
