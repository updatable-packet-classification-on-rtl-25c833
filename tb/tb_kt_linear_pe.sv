// Testbench for kt_linear_pe with 16 slots. Pending inserts fill it until
// the 17th must fail; pending deletes of present and absent rules must
// succeed or fail; freed slots are reused; updates already done upstream
// must bypass unchanged. Packet searches are checked against the best
// matching stored rule, and each search must finish within used + 4 cycles.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_linear_pe;
  import kt_pkg::*;
  import kt_tb_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, r_valid, r_ready, byp_push;
  logic [PKT_ID_W-1:0] s_pkt_id;
  header_t s_hdr;
  sres_t r_res;
  logic u_in_valid, u_in_ready, u_out_valid, u_out_ready;
  upd_t u_in, u_out;
  int checks = 0, failures = 0;

  kt_linear_pe #(.LIN_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ranges_t rr [int];
  int      pr [int];
  int      stored [int];     // ids held by the PE
  int      max_used = 0, nslots = 0;

  task automatic update(upd_t u, output upd_t res);
    @(negedge clk);
    u_in = u; u_in_valid = 1; #1;
    while (!u_in_ready) begin @(negedge clk); #1; end
    @(negedge clk); u_in_valid = 0;
    while (!u_out_valid) @(negedge clk);
    res = u_out;
    @(negedge clk);
  endtask

  int n_ok = 0, n_fail = 0, nfound = 0;
  task automatic ins(int id, bit done_before);
    upd_t u, res;
    bit exp_ok;
    u = '0; u.op = OP_INSERT; u.id = RULE_ID_W'(id);
    u.res = done_before ? RES_UPDATE_SUCCESS : RES_UPDATE_PENDING;
    rr[id] = rand_ranges(); pr[id] = (id * 7919) % 65521;
    u.r = rr[id]; u.prio = PRIO_W'(pr[id]);
    exp_ok = done_before || stored.size() < DEPTH;
    update(u, res);
    checks++;
    if ((res.res == RES_UPDATE_SUCCESS) != exp_ok || res.id != u.id) begin
      failures++; $display("insert %0d res %0d", id, res.res);
    end
    if (exp_ok) n_ok++; else n_fail++;
    if (exp_ok && !done_before) stored[id] = 1;
  endtask

  task automatic del(int id);
    upd_t u, res;
    bit exp_ok;
    u = '0; u.op = OP_DELETE; u.id = RULE_ID_W'(id); u.res = RES_UPDATE_PENDING;
    exp_ok = stored.exists(id);
    update(u, res);
    checks++;
    if ((res.res == RES_UPDATE_SUCCESS) != exp_ok) begin
      failures++; $display("delete %0d res %0d", id, res.res);
    end
    if (exp_ok) begin stored.delete(id); n_ok++; end else n_fail++;
  endtask

  task automatic search(int n);
    for (int i = 0; i < n; i++) begin
      header_t h;
      sres_t e;
      int t, k, id;
      if (stored.size() > 0 && $urandom_range(0, 3) != 0) begin
        k = $urandom_range(0, stored.size() - 1);
        void'(stored.first(id));
        repeat (k) void'(stored.next(id));
        h = pick_in(rr[id]);
      end else h = rand_hdr();
      e = '0;
      foreach (stored[j])
        if (ref_match(rr[j], h) && (!e.found || pr[j] > int'(e.prio))) begin
          e.found = 1; e.rule_id = RULE_ID_W'(j);
        end
      @(negedge clk);
      s_valid = 1; s_hdr = h; s_pkt_id = PKT_ID_W'(i); #1;
      while (!s_ready) begin @(negedge clk); #1; end
      @(negedge clk); s_valid = 0;
      t = 1;
      while (!r_valid) begin @(negedge clk); t++; end
      checks++;
      if (r_res.pkt_id != PKT_ID_W'(i) || r_res.found != e.found ||
          (e.found && r_res.rule_id != e.rule_id)) begin
        failures++; $display("search %0d: found %0d/%0d rule %0d/%0d", i, r_res.found,
                             e.found, r_res.rule_id, e.rule_id);
      end
      if (e.found) nfound++;
      checks++;
      if (t > int'(dut.used) + 4) begin failures++; $display("search took %0d cycles", t); end
      @(negedge clk);
    end
  endtask

  initial begin
    s_valid = 0; s_hdr = '0; s_pkt_id = 0; r_ready = 1; u_in_valid = 0; u_in = '0;
    u_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    search(5);                                   // empty
    for (int i = 0; i < 10; i++) ins(i, 0);
    search(100);
    ins(50, 1);                                  // bypass
    checks++;
    if (stored.exists(50)) failures++;
    for (int i = 10; i < 20; i++) ins(i, 0);     // 16 fit, 4 fail
    search(100);
    del(3); del(7); del(3); del(12345);
    search(100);
    ins(30, 0); ins(31, 0); ins(32, 0);          // two reuse freed slots
    search(100);
    for (int i = 0; i < 20; i++) del(i);
    search(20);
    $display("ok %0d fail %0d found %0d", n_ok, n_fail, nfound);
    checks++;
    if (n_fail == 0 || nfound == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
