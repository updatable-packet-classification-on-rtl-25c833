// kt_node_searcher: walks a decision tree from the root to a leaf.
//
// NS_UNITS search units work in parallel. Each accepts one job (a packet, or
// a rule to be updated, keyed by the low endpoints of its ranges), then
// repeatedly requests the node table read port. A round-robin arbiter grants
// one unit per cycle; the entry arrives one cycle later and the unit either
// descends to child_addr + child_index, or finishes on a leaf (hit), on an
// invalid node (miss / empty slot for an insert) or on the depth limit.
// For an update the unit also checks that the rule is not a wildcard at any
// selected bit; otherwise the rule cannot live in this tree (fail). Each unit
// keeps the last two levels it read (current node and parent, address and
// contents) so that the update engine can rewrite them.
// Finished units are drained round-robin into the out stream (valid/ready).
// Latency of a job: about two cycles per level with no contention.
// Root at node address 0 and the child index bit order are this design's
// choices.
//
// From the published architecture: several search units sharing one node-
// table port round-robin, three selected bits per node, caching of the last
// two levels of nodes for updates, and kicking a rule out of a tree when a
// selected bit is a wildcard in it. Own choices: the root at address 0, the
// child index order, the job and result formats and the depth guard.
module kt_node_searcher
  import kt_pkg::*;
#(
  parameter int unsigned NS_UNITS  = 5,
  parameter int unsigned MAX_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  ns_job_t            in_job,
  output logic               rd_en,
  output logic [NODE_AW-1:0] rd_addr,
  input  node_t              rd_data,
  output logic               out_valid,
  input  logic               out_ready,
  output ns_out_t            out,
  output logic               busy
);
  localparam int unsigned UW = (NS_UNITS > 1) ? $clog2(NS_UNITS) : 1;

  typedef enum logic [1:0] {U_IDLE, U_REQ, U_WAIT, U_DONE} ustate_e;

  ustate_e            st   [NS_UNITS];
  ns_out_t            job  [NS_UNITS];
  logic [NODE_AW-1:0] addr [NS_UNITS];
  logic [3:0]         lvl  [NS_UNITS];

  logic [NS_UNITS-1:0] req, done, idle, rgnt, ognt;
  logic [UW-1:0]       ridx, oidx, iidx;
  logic                rd_q;
  logic [UW-1:0]       rd_unit_q;

  always_comb begin
    for (int u = 0; u < NS_UNITS; u++) begin
      req[u]  = (st[u] == U_REQ);
      done[u] = (st[u] == U_DONE);
      idle[u] = (st[u] == U_IDLE);
    end
    iidx = '0;
    for (int u = NS_UNITS - 1; u >= 0; u--) if (idle[u]) iidx = UW'(u);
  end

  assign in_ready = |idle;
  assign busy     = ~&idle;

  kt_rr_arbiter #(.N(NS_UNITS)) u_rd_arb (
    .clk, .rst_n, .req, .advance(1'b1), .gnt(rgnt), .gnt_idx(ridx));
  kt_rr_arbiter #(.N(NS_UNITS)) u_out_arb (
    .clk, .rst_n, .req(done), .advance(out_ready), .gnt(ognt), .gnt_idx(oidx));

  assign rd_en     = |req;
  assign rd_addr   = addr[ridx];
  assign out_valid = |done;
  assign out       = job[oidx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q <= 1'b0;
      rd_unit_q <= '0;
      for (int u = 0; u < NS_UNITS; u++) st[u] <= U_IDLE;
    end else begin
      rd_q      <= rd_en;
      rd_unit_q <= ridx;

      // accept a new job into the lowest idle unit
      if (in_valid && in_ready) begin
        st[iidx]   <= U_REQ;
        addr[iidx] <= '0;
        lvl[iidx]  <= '0;
        job[iidx].is_upd       <= in_job.is_upd;
        job[iidx].pkt_id       <= in_job.pkt_id;
        job[iidx].hdr          <= in_job.hdr;
        job[iidx].upd          <= in_job.upd;
        job[iidx].hit          <= 1'b0;
        job[iidx].fail         <= 1'b0;
        job[iidx].parent_valid <= 1'b0;
        job[iidx].leaf_addr    <= '0;
      end

      // read port granted
      if (rd_en) st[ridx] <= U_WAIT;

      // node entry returned for the unit granted last cycle
      if (rd_q) begin : eval
        automatic int unsigned u = 32'(rd_unit_q);
        automatic node_t n = rd_data;
        automatic logic [NODE_AW-1:0] child;
        child = n.addr[NODE_AW-1:0] + NODE_AW'(child_index(job[u].hdr, n));
        // shift the two-level cache
        job[u].parent_valid <= (lvl[u] != '0);
        job[u].parent_addr  <= job[u].leaf_addr;
        job[u].parent_node  <= job[u].leaf_node;
        job[u].leaf_addr    <= addr[u];
        job[u].leaf_node    <= n;
        if (!n.node_valid) begin
          st[u] <= U_DONE;                       // empty node: miss
        end else if (n.is_leaf) begin
          st[u] <= U_DONE;
          job[u].hit <= 1'b1;
        end else if (job[u].is_upd && !node_fixed(job[u].upd.r, n)) begin
          st[u] <= U_DONE;                       // wildcard: kicked out
          job[u].fail <= 1'b1;
        end else if (int'(lvl[u]) + 1 >= MAX_DEPTH + 1) begin
          st[u] <= U_DONE;                       // deeper than allowed
          job[u].fail <= 1'b1;
        end else begin
          st[u]   <= U_REQ;
          addr[u] <= child;
          lvl[u]  <= lvl[u] + 1'b1;
        end
      end

      if (out_valid && out_ready) st[oidx] <= U_IDLE;
    end
  end

  // the returned entry always belongs to a unit waiting for it
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_q |-> st[rd_unit_q] == U_WAIT);
endmodule
