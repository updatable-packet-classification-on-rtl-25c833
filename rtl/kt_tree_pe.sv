// kt_tree_pe: one search-tree processing element (PE).
//
// Holds one decision tree in two memories, the node table and the rule
// table, each split into a lower and an upper part (kt_table_ram). A Node
// Searcher walks the tree and a Rule Processor scans the leaf's rules, each
// with several units sharing its memory's single read port.
//  Search: s_* carries (packet ID, header) from the classifier, which
//    broadcasts every packet to all PEs. The result (best matching rule of
//    this tree or not found) leaves on r_*, possibly out of packet order.
//  Update: u_in_* carries an update command from the previous PE. One that
//    an earlier PE already carried out (UPDATE_SUCCESS) is put into the
//    bypass FIFO and forwarded untouched. Otherwise it is run on this tree:
//    the rule's low endpoints serve as its header for the Node Searcher and
//    the update engine inserts or deletes it. It leaves on u_out_* as
//    UPDATE_SUCCESS or still pending. One update at a time is inside the
//    tree; it takes the Node Searcher ahead of waiting packets.
//  cfg: host writes of node and rule entries and of the first spare rule
//    entry, used to load a tree built in software. Host writes take the
//    memory write ports and are meant for an idle PE.
//
// From the published architecture: the node and rule tables, the Node
// Searcher and Rule Processor, and a bypass FIFO that forwards updates
// already done upstream. Own choices: one update inside a PE at a time,
// updates taking the Node Searcher before waiting packets, and host writes
// overriding update writes.
module kt_tree_pe
  import kt_pkg::*;
#(
  parameter int unsigned NODE_LAW    = 15,
  parameter int unsigned NODE_UDEPTH = 8192,
  parameter int unsigned RULE_LAW    = 17,
  parameter int unsigned RULE_UDEPTH = 0,
  parameter int unsigned NS_UNITS    = 5,
  parameter int unsigned RP_UNITS    = 6,
  parameter int unsigned BINTH       = 10,
  parameter int unsigned MAX_DEPTH   = 8,
  parameter int unsigned BYP_DEPTH   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid,
  output logic                s_ready,
  input  logic [PKT_ID_W-1:0] s_pkt_id,
  input  header_t             s_hdr,
  output logic                r_valid,
  input  logic                r_ready,
  output sres_t               r_res,
  input  logic                u_in_valid,
  output logic                u_in_ready,
  input  upd_t                u_in,
  output logic                u_out_valid,
  input  logic                u_out_ready,
  output upd_t                u_out,
  input  cfg_t                cfg,
  output logic                byp_push,   // an update entered the bypass FIFO
  output logic                busy        // a packet or update is inside
);
  localparam int unsigned RULE_DEPTH = (1 << RULE_LAW) + RULE_UDEPTH;

  // ------------------------------------------------------------ memories
  logic               n_re, n_we_u, n_we;
  logic [NODE_AW-1:0] n_raddr, n_waddr_u, n_waddr;
  node_t              n_rdata, n_wdata_u, n_wdata;
  logic               r_re, r_we_u, r_we;
  logic [RULE_AW-1:0] r_raddr, r_waddr_u, r_waddr;
  rule_t              r_rdata, r_wdata_u, r_wdata;

  always_comb begin
    n_we    = n_we_u;  n_waddr = n_waddr_u;  n_wdata = n_wdata_u;
    r_we    = r_we_u;  r_waddr = r_waddr_u;  r_wdata = r_wdata_u;
    if (cfg.we && cfg.tbl == CFG_NODE) begin
      n_we = 1'b1; n_waddr = cfg.addr[NODE_AW-1:0]; n_wdata = cfg.node;
    end
    if (cfg.we && cfg.tbl == CFG_RULE) begin
      r_we = 1'b1; r_waddr = cfg.addr; r_wdata = cfg.rule;
    end
  end

  kt_table_ram #(.WIDTH($bits(node_t)), .AW(NODE_AW), .LAW(NODE_LAW),
                 .UDEPTH(NODE_UDEPTH)) u_node_ram (
    .clk, .we(n_we), .waddr(n_waddr), .wdata(n_wdata),
    .re(n_re), .raddr(n_raddr), .rdata(n_rdata));

  kt_table_ram #(.WIDTH($bits(rule_t)), .AW(RULE_AW), .LAW(RULE_LAW),
                 .UDEPTH(RULE_UDEPTH)) u_rule_ram (
    .clk, .we(r_we), .waddr(r_waddr), .wdata(r_wdata),
    .re(r_re), .raddr(r_raddr), .rdata(r_rdata));

  // ------------------------------------------------- update entry / bypass
  logic    upd_busy, upd_take, byp_in_valid, byp_in_ready;
  logic [$clog2(BYP_DEPTH+1)-1:0] byp_count;   // occupancy, for debug
  logic    byp_out_valid, byp_out_ready;
  upd_t    byp_out;
  logic    pu_valid, pu_ready;
  upd_t    pu;
  logic    ns_in_valid, ns_in_ready;
  ns_job_t ns_job;

  assign byp_in_valid = u_in_valid && (u_in.res == RES_UPDATE_SUCCESS);
  assign upd_take     = u_in_valid && (u_in.res != RES_UPDATE_SUCCESS) &&
                        !upd_busy;
  assign u_in_ready   = (u_in.res == RES_UPDATE_SUCCESS) ? byp_in_ready
                                                         : (!upd_busy && ns_in_ready);

  assign byp_push = byp_in_valid && byp_in_ready;
  kt_fifo #(.WIDTH($bits(upd_t)), .DEPTH(BYP_DEPTH)) u_bypass (
    .clk, .rst_n, .in_valid(byp_in_valid), .in_ready(byp_in_ready),
    .in_data(u_in), .out_valid(byp_out_valid), .out_ready(byp_out_ready),
    .out_data(byp_out), .count(byp_count));

  // updates go into the Node Searcher ahead of packets
  always_comb begin
    ns_job = '0;
    if (upd_take) begin
      ns_in_valid   = 1'b1;
      ns_job.is_upd = 1'b1;
      ns_job.hdr    = lo_header(u_in.r);
      ns_job.upd    = u_in;
    end else begin
      ns_in_valid   = s_valid;
      ns_job.pkt_id = s_pkt_id;
      ns_job.hdr    = s_hdr;
    end
  end
  assign s_ready = ns_in_ready && !upd_take;

  always_ff @(posedge clk) begin
    if (!rst_n) upd_busy <= 1'b0;
    else if (upd_take && ns_in_ready) upd_busy <= 1'b1;
    else if (pu_valid && pu_ready) upd_busy <= 1'b0;
  end

  // update results: bypassed ones first, then the tree's own
  assign u_out_valid   = byp_out_valid || pu_valid;
  assign u_out         = byp_out_valid ? byp_out : pu;
  assign byp_out_ready = u_out_ready;
  assign pu_ready      = u_out_ready && !byp_out_valid;

  // ------------------------------------------------- searcher / processor
  logic    ns_out_valid, ns_out_ready, ns_busy, rp_busy;
  ns_out_t ns_out;

  kt_node_searcher #(.NS_UNITS(NS_UNITS), .MAX_DEPTH(MAX_DEPTH)) u_ns (
    .clk, .rst_n, .in_valid(ns_in_valid), .in_ready(ns_in_ready),
    .in_job(ns_job), .rd_en(n_re), .rd_addr(n_raddr), .rd_data(n_rdata),
    .out_valid(ns_out_valid), .out_ready(ns_out_ready), .out(ns_out),
    .busy(ns_busy));

  kt_rule_processor #(.RP_UNITS(RP_UNITS), .BINTH(BINTH),
                      .RULE_DEPTH(RULE_DEPTH)) u_rp (
    .clk, .rst_n, .in_valid(ns_out_valid), .in_ready(ns_out_ready),
    .in(ns_out), .rd_en(r_re), .rd_addr(r_raddr), .rd_data(r_rdata),
    .rule_we(r_we_u), .rule_waddr(r_waddr_u), .rule_wdata(r_wdata_u),
    .node_we(n_we_u), .node_waddr(n_waddr_u), .node_wdata(n_wdata_u),
    .cfg_spare_we(cfg.we && cfg.tbl == CFG_SPARE), .cfg_spare_addr(cfg.addr),
    .res_valid(r_valid), .res_ready(r_ready), .res(r_res),
    .upd_valid(pu_valid), .upd_ready(pu_ready), .upd(pu), .busy(rp_busy));
  assign busy = ns_busy || rp_busy || upd_busy;
endmodule
