// Testbench for kt_resolver2. Two producers model PEs: each holds up to 8
// packets at a time (at most 16 in flight, as the classifier enforces) and hands their results over in random order, with
// random stalls; channel 1 is much slower in the first half, which must
// make the balancer hold channel 0 back. The merged output must come in
// packet order with the higher-priority match of the two channels.
// A second instance in bypass mode is fed by a third producer and must
// return that producer's results in order.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_resolver2;
  import kt_pkg::*;

  localparam int NPKT = 2000;
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready, throttle, b_ready, b_thr;
  sres_t [1:0] in_res;
  logic out_valid, out_ready, b_valid;
  sres_t out_res, b_res, b_in_res;
  logic b_in_valid;
  int checks = 0, failures = 0;

  kt_resolver2 #(.ROB_AW(4), .BYPASS(0), .BAL_THRESH(4)) dut (.*);
  kt_resolver2 #(.ROB_AW(4), .BYPASS(1)) dut_b (
    .clk, .rst_n, .in_valid({1'b0, b_in_valid}), .in_ready(b_ready),
    .in_res({in_res[1], b_in_res}), .out_valid(b_valid), .out_ready(1'b1), .out_res(b_res),
    .throttle(b_thr));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producers 0 and 1 feed the normal instance, producer 2 the bypass one
  sres_t res [3][NPKT];
  int    held [3][$];
  int    next_issue [3] = '{0, 0, 0};
  int    cur [3] = '{-1, -1, -1};
  logic  pv [3];
  logic  prdy [3];
  sres_t pd [3];
  assign in_valid = {pv[1], pv[0]};
  assign in_res   = {pd[1], pd[0]};
  assign b_in_valid = pv[2];
  assign b_in_res   = pd[2];
  assign prdy[0] = in_ready[0];
  assign prdy[1] = in_ready[1];
  assign prdy[2] = b_ready[0];

  int nthr = 0;
  int nout = 0, bout = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) begin
      if (pv[c] && prdy[c]) begin
        held[c].delete(cur[c]);
        cur[c] = -1;
      end
    end
    if (throttle != 0) nthr++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) begin
      int slow;
      slow = (c == 1 && next_issue[1] < NPKT / 2) ? 6 : 1;
      // like the classifier, keep at most 16 packets in flight
      while (held[c].size() < 8 && next_issue[c] < NPKT &&
             next_issue[c] < ((c == 2) ? bout : nout) + 16) begin
        held[c].push_back(next_issue[c]); next_issue[c]++;
      end
      if (cur[c] < 0 && held[c].size() > 0 && $urandom_range(0, slow) == 0)
        cur[c] = $urandom_range(0, held[c].size() - 1);
      pv[c] = (cur[c] >= 0);
      pd[c] = (cur[c] >= 0) ? res[c][held[c][cur[c]]] : '0;
    end
    out_ready = $urandom_range(0, 4) != 0;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    sres_t e;
    e = res[0][nout];
    if (res[1][nout].found && (!e.found || res[1][nout].prio > e.prio)) e = res[1][nout];
    checks++;
    if (out_res.pkt_id != PKT_ID_W'(nout) || out_res.found != e.found ||
        (e.found && (out_res.rule_id != e.rule_id))) begin
      failures++; $display("out %0d: id %0d rule %0d exp %0d", nout, out_res.pkt_id,
                           out_res.rule_id, e.rule_id);
    end
    nout++;
  end
  always @(posedge clk) if (rst_n && b_valid) begin
    checks++;
    if (b_res.pkt_id != PKT_ID_W'(bout) || b_res.found != res[2][bout].found ||
        b_res.rule_id != res[2][bout].rule_id) begin
      failures++; $display("bypass out %0d wrong", bout);
    end
    bout++;
  end

  initial begin
    for (int i = 0; i < NPKT; i++)
      for (int c = 0; c < 3; c++) begin
        res[c][i].pkt_id  = PKT_ID_W'(i);
        res[c][i].found   = $urandom_range(0, 2) != 0;
        res[c][i].rule_id = RULE_ID_W'($urandom());
        res[c][i].prio    = PRIO_W'($urandom_range(0, 1000) * 2 + c);
      end
    for (int c = 0; c < 3; c++) begin pv[c] = 0; pd[c] = '0; end
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout == NPKT && bout == NPKT);
    repeat (5) @(posedge clk);
    $display("balancer active in %0d cycles", nthr);
    checks++;
    if (nthr == 0) begin failures++; $display("balancer never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
