// End-to-end testbench for kt_classifier at reduced size: three trees with
// binth 2, a linear PE with 8 slots, 2 + 2 search units per PE, reorder
// window 16 and balancer threshold 0 (the smallest, so the balancer acts at
// this small size). Each tree's root (loaded by the host) selects three bits
// and has eight empty children, so rules are placed by the update path alone.
// Rules are inserted and deleted through the update port and packets are
// searched in pipelined bursts under random back-pressure; every update
// result and every packet result is checked against kt_tb_model.
// Mechanisms that must each be seen: an update passing a tree through its
// bypass FIFO, an insert landing in the linear PE, an insert failing in all
// PEs, an update waiting for in-flight packets (mode switch), a packet
// waiting for an update, and a result resolver balancer holding a channel.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_classifier;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  localparam int NT = 3, BINTH = 2, LIN = 8;
  localparam tree_arr_t SMALL_NODE = '{default: 4};
  localparam tree_arr_t ZERO       = '{default: 0};
  localparam tree_arr_t SMALL_RULE = '{default: 6};
  localparam tree_arr_t BT         = '{default: BINTH};

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, r_valid, r_ready, u_valid, u_ready, ur_valid, ur_ready;
  header_t s_hdr;
  sres_t r_res;
  res_e r_code;
  upd_t u_cmd, ur_res;
  cfg_t cfg;
  logic [4:0] cfg_pe;
  logic upd_mode, throttled;
  logic [NT:0] byp_push;
  int checks = 0, failures = 0;

  kt_classifier #(.NUM_TREES(NT), .NS_UNITS(2), .RP_UNITS(2),
                  .NODE_LAW(SMALL_NODE), .NODE_UDEPTH(ZERO),
                  .RULE_LAW(SMALL_RULE), .RULE_UDEPTH(ZERO), .BINTH(BT),
                  .LIN_DEPTH(LIN), .ROB_AW(4), .BAL_THRESH(0)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  kt_tb_model m;

  // ------------------------------------------------ mechanism counters
  int n_bypass = 0, n_throttle = 0, n_upd_wait = 0, n_pkt_wait = 0;
  int n_linear = 0, n_fail = 0, n_found = 0;
  always @(posedge clk) if (rst_n) begin
    n_bypass   += $countones(byp_push);
    if (throttled) n_throttle++;
    if (u_valid && !u_ready && dut.inflight != 0) n_upd_wait++;
    if (s_valid && !s_ready && (upd_mode || u_valid)) n_pkt_wait++;
  end

  // -------------------------------------------------------- results
  sres_t exp_q [$];
  int nres = 0;
  always @(posedge clk) if (rst_n && r_valid && r_ready) begin
    sres_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = exp_q.pop_front();
      if (r_res.found != e.found || (e.found && r_res.rule_id != e.rule_id) ||
          r_code != (e.found ? RES_RULE_FOUND : RES_RULE_NOT_FOUND)) begin
        failures++;
        $display("packet %0d: found %0d/%0d rule %0d/%0d", nres, r_res.found, e.found,
                 r_res.rule_id, e.rule_id);
      end
      if (e.found) n_found++;
    end
    nres++;
  end

  task automatic cfg_node(int pe, int addr, node_t n);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = CFG_NODE; cfg.addr = RULE_AW'(addr); cfg.node = n;
    cfg_pe = 5'(pe);
    @(negedge clk); cfg = '0;
  endtask

  task automatic search(int n);
    for (int i = 0; i < n; i++) begin
      header_t h = m.pick();
      @(negedge clk);
      s_valid = 1; s_hdr = h; #1;
      while (!s_ready) begin @(negedge clk); #1; end
      exp_q.push_back(m.search(h));   // the model state is the one at issue
      @(posedge clk); #1;
      s_valid = 0;
    end
  endtask

  task automatic update(op_e op, int id);
    upd_t u;
    int exp_where;
    bit exp_ok;
    u = '0; u.op = op; u.id = RULE_ID_W'(id); u.res = RES_UPDATE_PENDING;
    u.prio = PRIO_W'((id * 7919) % 65521);
    if (op == OP_INSERT) begin
      u.r = rand_ranges();
      exp_where = m.insert(id, u.r, int'(u.prio));
      exp_ok = exp_where >= 0;
      if (exp_where == NT) n_linear++;
      if (exp_where < 0) n_fail++;
    end else begin
      // a delete carries the rule's fields so the trees can be walked
      if (m.rr.exists(id)) u.r = m.rr[id];
      exp_ok = m.delete(id);
    end
    @(negedge clk);
    u_cmd = u; u_valid = 1; #1;
    while (!u_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    u_valid = 0;
    while (!ur_valid) @(negedge clk);
    checks++;
    if (ur_res.id != u.id || ur_res.res != (exp_ok ? RES_UPDATE_SUCCESS : RES_UPDATE_FAILURE)) begin
      failures++; $display("update op %0d id %0d: res %0d expected ok %0d", op, id, ur_res.res, exp_ok);
    end
    @(posedge clk);
  endtask

  initial begin
    int next_id = 1;
    m = new(NT, BINTH, LIN);
    s_valid = 0; s_hdr = '0; r_ready = 1; u_valid = 0; u_cmd = '0; ur_ready = 1;
    cfg = '0; cfg_pe = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      cfg_node(t, 0, m.root(t));
      for (int a = 8; a < 16; a++) cfg_node(t, a, '0);
    end
    search(20);
    wait (nres == 20);
    for (int i = 0; i < 70; i++) begin update(OP_INSERT, next_id); next_id++; end
    fork
      search(400);
      forever begin @(negedge clk); r_ready = $urandom_range(0, 3) != 0; end
      begin                           // updates arriving while packets fly
        repeat (300) @(posedge clk);
        update(OP_DELETE, 3);
        repeat (200) @(posedge clk);
        update(OP_INSERT, next_id); next_id++;
      end
    join_any
    wait (nres == 420);
    disable fork;
    r_ready = 1;
    for (int i = 0; i < 30; i++) update(OP_DELETE, $urandom_range(1, next_id));
    search(200);
    for (int i = 0; i < 30; i++) begin update(OP_INSERT, next_id); next_id++; end
    search(300);
    wait (nres == 920);
    repeat (10) @(posedge clk);
    $display("bypass %0d throttle %0d upd_wait %0d pkt_wait %0d linear %0d fail %0d found %0d",
             n_bypass, n_throttle, n_upd_wait, n_pkt_wait, n_linear, n_fail, n_found);
    checks++;
    if (n_bypass == 0 || n_throttle == 0 || n_upd_wait == 0 || n_pkt_wait == 0 ||
        n_linear == 0 || n_fail == 0 || n_found == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
