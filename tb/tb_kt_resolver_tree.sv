// Testbench for kt_resolver_tree with five inputs (three levels; bypass-mode
// resolvers at the first and second level). Five producers model PEs that
// return results out of order with random stalls, with at most 16 packets in
// flight. The single output must come in packet order and carry, per packet,
// the highest-priority match of all five inputs.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_resolver_tree;
  import kt_pkg::*;

  localparam int N = 5, NPKT = 1500;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready;
  sres_t [N-1:0] in_res;
  logic out_valid, out_ready, throttled;
  sres_t out_res;
  int checks = 0, failures = 0;

  kt_resolver_tree #(.N(N), .ROB_AW(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sres_t res [N][NPKT];
  int    held [N][$];
  int    next_issue [N];
  int    cur [N];
  int    nout = 0;

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < N; c++)
      if (in_valid[c] && in_ready[c]) begin held[c].delete(cur[c]); cur[c] = -1; end

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      while (held[c].size() < 6 && next_issue[c] < NPKT && next_issue[c] < nout + 16) begin
        held[c].push_back(next_issue[c]); next_issue[c]++;
      end
      if (cur[c] < 0 && held[c].size() > 0 && $urandom_range(0, c) == 0)
        cur[c] = $urandom_range(0, held[c].size() - 1);
      in_valid[c] = (cur[c] >= 0);
      in_res[c]   = (cur[c] >= 0) ? res[c][held[c][cur[c]]] : '0;
    end
    out_ready = $urandom_range(0, 4) != 0;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    sres_t e;
    e = '0;
    for (int c = 0; c < N; c++)
      if (res[c][nout].found && (!e.found || res[c][nout].prio > e.prio)) e = res[c][nout];
    checks++;
    if (out_res.pkt_id != PKT_ID_W'(nout) || out_res.found != e.found ||
        (e.found && out_res.rule_id != e.rule_id)) begin
      failures++; $display("out %0d: id %0d found %0d rule %0d exp %0d", nout,
                           out_res.pkt_id, out_res.found, out_res.rule_id, e.rule_id);
    end
    nout++;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      next_issue[c] = 0; cur[c] = -1;
      for (int i = 0; i < NPKT; i++) begin
        res[c][i].pkt_id  = PKT_ID_W'(i);
        res[c][i].found   = $urandom_range(0, 3) == 0;
        res[c][i].rule_id = RULE_ID_W'(1000 * c + i % 1000);
        res[c][i].prio    = PRIO_W'($urandom_range(0, 10000) * N + c);
      end
    end
    in_valid = 0; in_res = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout == NPKT);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
