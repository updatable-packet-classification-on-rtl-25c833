// kt_rule_processor: searches the rule list of the leaf a packet reached,
// and hands rule updates to kt_rule_updater.
//
// RP_UNITS search units work in parallel. A unit takes one traversal result
// from the Node Searcher; a miss becomes a "not found" result at once,
// otherwise the unit follows the leaf's linked rule list, reading one rule
// table entry per grant, and keeps the highest-priority rule that matches
// the header (the list is not assumed sorted). The rule table read port is
// shared round-robin between the search units and the update engine; data
// return one cycle after the grant. Finished units are drained round-robin
// into the search result stream; update results leave on a separate stream.
// Results may leave out of packet order.
//
// From the published architecture: several rule search units sharing the
// rule-table port round-robin, and separate handling of searches and rule
// updates. Own choices: the unit hand-off, the update engine taking the last
// arbiter slot, and scanning whole lists without assuming them sorted.
module kt_rule_processor
  import kt_pkg::*;
#(
  parameter int unsigned RP_UNITS   = 6,
  parameter int unsigned BINTH      = 10,
  parameter int unsigned RULE_DEPTH = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  ns_out_t            in,
  output logic               rd_en,
  output logic [RULE_AW-1:0] rd_addr,
  input  rule_t              rd_data,
  output logic               rule_we,
  output logic [RULE_AW-1:0] rule_waddr,
  output rule_t              rule_wdata,
  output logic               node_we,
  output logic [NODE_AW-1:0] node_waddr,
  output node_t              node_wdata,
  input  logic               cfg_spare_we,
  input  logic [RULE_AW-1:0] cfg_spare_addr,
  output logic               res_valid,
  input  logic               res_ready,
  output sres_t              res,
  output logic               upd_valid,
  input  logic               upd_ready,
  output upd_t               upd,
  output logic               busy
);
  localparam int unsigned N  = RP_UNITS + 1;          // + update engine
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned UW = (RP_UNITS > 1) ? $clog2(RP_UNITS) : 1;

  typedef enum logic [1:0] {U_IDLE, U_REQ, U_WAIT, U_DONE} ustate_e;

  ustate_e            st   [RP_UNITS];
  header_t            hdr  [RP_UNITS];
  logic [RULE_AW-1:0] addr [RP_UNITS];
  sres_t              best [RP_UNITS];

  logic [N-1:0]        req, gnt;
  logic [IW-1:0]       gidx;
  logic [RP_UNITS-1:0] done, idle, ognt;
  logic [UW-1:0]       oidx, iidx;
  logic                rd_q;
  logic [IW-1:0]       rd_idx_q;

  logic               u_in_valid, u_in_ready, u_rd_req;
  logic [RULE_AW-1:0] u_rd_addr;

  always_comb begin
    for (int u = 0; u < RP_UNITS; u++) begin
      req[u]  = (st[u] == U_REQ);
      done[u] = (st[u] == U_DONE);
      idle[u] = (st[u] == U_IDLE);
    end
    req[RP_UNITS] = u_rd_req;
    iidx = '0;
    for (int u = RP_UNITS - 1; u >= 0; u--) if (idle[u]) iidx = UW'(u);
  end

  assign u_in_valid = in_valid && in.is_upd;
  assign in_ready   = in.is_upd ? u_in_ready : |idle;
  assign busy       = ~&idle;

  kt_rr_arbiter #(.N(N)) u_rd_arb (
    .clk, .rst_n, .req, .advance(1'b1), .gnt, .gnt_idx(gidx));
  kt_rr_arbiter #(.N(RP_UNITS)) u_out_arb (
    .clk, .rst_n, .req(done), .advance(res_ready), .gnt(ognt), .gnt_idx(oidx));

  assign rd_en     = |req;
  assign rd_addr   = (int'(gidx) == RP_UNITS) ? u_rd_addr : addr[UW'(gidx)];
  assign res_valid = |done;
  assign res       = best[oidx];

  kt_rule_updater #(.BINTH(BINTH), .RULE_DEPTH(RULE_DEPTH)) u_upd (
    .clk, .rst_n,
    .in_valid(u_in_valid), .in_ready(u_in_ready), .in,
    .rd_req(u_rd_req), .rd_addr(u_rd_addr), .rd_gnt(gnt[RP_UNITS]),
    .rd_data,
    .rule_we, .rule_waddr, .rule_wdata, .node_we, .node_waddr, .node_wdata,
    .cfg_spare_we, .cfg_spare_addr,
    .out_valid(upd_valid), .out_ready(upd_ready), .out(upd));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q     <= 1'b0;
      rd_idx_q <= '0;
      for (int u = 0; u < RP_UNITS; u++) st[u] <= U_IDLE;
    end else begin
      rd_q     <= rd_en;
      rd_idx_q <= gidx;

      if (in_valid && !in.is_upd && in_ready) begin
        hdr[iidx]          <= in.hdr;
        addr[iidx]         <= in.leaf_node.addr;
        best[iidx].pkt_id  <= in.pkt_id;
        best[iidx].found   <= 1'b0;
        best[iidx].rule_id <= '0;
        best[iidx].prio    <= '0;
        st[iidx]           <= in.hit ? U_REQ : U_DONE;
      end

      if (rd_en && int'(gidx) < RP_UNITS) st[UW'(gidx)] <= U_WAIT;

      if (rd_q && int'(rd_idx_q) < RP_UNITS) begin : eval
        automatic int unsigned u = 32'(rd_idx_q);
        if (rule_match(rd_data.r, hdr[u]) &&
            (!best[u].found || rd_data.prio > best[u].prio)) begin
          best[u].found   <= 1'b1;
          best[u].rule_id <= rd_data.id;
          best[u].prio    <= rd_data.prio;
        end
        if (rd_data.next_valid) begin
          addr[u] <= rd_data.next_addr;
          st[u]   <= U_REQ;
        end else begin
          st[u]   <= U_DONE;
        end
      end

      if (res_valid && res_ready) st[oidx] <= U_IDLE;
    end
  end
endmodule
