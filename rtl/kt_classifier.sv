// kt_classifier: one classifier core, NUM_TREES search-tree PEs plus a final
// linear-search PE.
//
// Search: each packet header on s_* gets the next packet ID and is handed to
// every PE in the same cycle (the input waits until all PEs can take it).
// The PEs search their own trees in parallel; the resolver tree picks the
// highest-priority match per packet and returns the results in packet order
// on r_*.
// Update: an INSERT or DELETE on u_* enters PE 0 as pending and visits the
// PEs in turn: each tries it until one succeeds, after which the later PEs
// only forward it through their bypass FIFOs. The linear PE is the last
// stop; what is still pending there fails. The result leaves on ur_*.
// At most 2^ROB_AW packets are in flight, the depth of the resolvers'
// reorder memories.
// Mode switch: classification is suspended for an update. An update is
// accepted only when no packet is in flight, and packets are held until its
// result has left; one update is in flight at a time.
// cfg_pe selects the PE whose tables a host write on cfg goes to.
// Per-tree sizes come from the tree_arr_t parameter arrays (index = tree).
//
// From the published architecture: parallel search over all PEs, serial
// update through them, the linear last PE, suspension of classification
// during updates, hierarchical result collection. Own choices: the packet-ID
// counter, the in-flight limit, one update at a time, the host write port
// and the observation outputs (upd_mode, throttled, byp_push).
module kt_classifier
  import kt_pkg::*;
#(
  parameter int unsigned NUM_TREES   = 10,
  parameter int unsigned NS_UNITS    = 5,
  parameter int unsigned RP_UNITS    = 6,
  parameter tree_arr_t   NODE_LAW    = DEF_NODE_LAW,
  parameter tree_arr_t   NODE_UDEPTH = DEF_NODE_UDEPTH,
  parameter tree_arr_t   RULE_LAW    = DEF_RULE_LAW,
  parameter tree_arr_t   RULE_UDEPTH = DEF_RULE_UDEPTH,
  parameter tree_arr_t   BINTH       = DEF_BINTH,
  parameter tree_arr_t   MAX_DEPTH   = DEF_MAX_DEPTH,
  parameter int unsigned LIN_DEPTH   = 1024,
  parameter int unsigned ROB_AW      = 6,
  parameter int unsigned BAL_THRESH  = 4,
  localparam int unsigned NPE = NUM_TREES + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  input  header_t       s_hdr,
  output logic          r_valid,
  input  logic          r_ready,
  output sres_t         r_res,
  output res_e          r_code,
  input  logic          u_valid,
  output logic          u_ready,
  input  upd_t          u_cmd,
  output logic          ur_valid,
  input  logic          ur_ready,
  output upd_t          ur_res,
  input  cfg_t          cfg,
  input  logic [4:0]    cfg_pe,
  output logic          upd_mode,     // an update is in progress
  output logic          throttled,    // a resolver balancer is active
  output logic [NPE-1:0] byp_push     // per PE: an update took its bypass FIFO
);
  logic [PKT_ID_W-1:0] next_id;
  logic [PKT_ID_W:0]   inflight;
  logic [NPE-1:0]      ps_ready, pr_valid, pr_ready;
  logic [NUM_TREES-1:0] pe_busy;
  sres_t [NPE-1:0]     pr_res;
  logic [NPE:0]        uv, urd;
  upd_t [NPE:0]        ud;
  logic                s_fire, r_fire;

  // ----------------------------------------------------- search dispatch
  // an update waiting at the input also stops new packets so the PEs drain
  // at most 2^ROB_AW packets in flight, so no result falls outside a
  // resolver's reorder window
  assign s_ready = (&ps_ready) && !upd_mode && !u_valid &&
                   (inflight < (PKT_ID_W+1)'(1 << ROB_AW));
  assign s_fire  = s_valid && s_ready;
  assign r_fire  = r_valid && r_ready;

  // ----------------------------------------------------- update dispatch
  logic u_go;
  assign u_go    = !upd_mode && (inflight == '0) && !(|pe_busy);
  assign u_ready = u_go && urd[0];
  always_comb begin
    ud[0]     = u_cmd;
    ud[0].res = RES_UPDATE_PENDING;
  end
  assign uv[0]    = u_valid && u_go;
  assign ur_valid = uv[NPE];
  assign ur_res   = ud[NPE];
  assign urd[NPE] = ur_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_id  <= '0;
      inflight <= '0;
      upd_mode <= 1'b0;
    end else begin
      if (s_fire) next_id <= next_id + 1'b1;
      inflight <= inflight + (PKT_ID_W+1)'(s_fire) - (PKT_ID_W+1)'(r_fire);
      if (u_valid && u_ready) upd_mode <= 1'b1;
      else if (ur_valid && ur_ready) upd_mode <= 1'b0;
    end
  end

  // ------------------------------------------------------------------ PEs
  for (genvar i = 0; i < NUM_TREES; i++) begin : g_pe
    cfg_t pcfg;
    always_comb begin
      pcfg    = cfg;
      pcfg.we = cfg.we && (int'(cfg_pe) == i);
    end
    kt_tree_pe #(
      .NODE_LAW(NODE_LAW[i]), .NODE_UDEPTH(NODE_UDEPTH[i]),
      .RULE_LAW(RULE_LAW[i]), .RULE_UDEPTH(RULE_UDEPTH[i]),
      .NS_UNITS(NS_UNITS), .RP_UNITS(RP_UNITS),
      .BINTH(BINTH[i]), .MAX_DEPTH(MAX_DEPTH[i])) u_pe (
      .clk, .rst_n,
      .s_valid(s_fire), .s_ready(ps_ready[i]), .s_pkt_id(next_id), .s_hdr,
      .r_valid(pr_valid[i]), .r_ready(pr_ready[i]), .r_res(pr_res[i]),
      .u_in_valid(uv[i]), .u_in_ready(urd[i]), .u_in(ud[i]),
      .u_out_valid(uv[i+1]), .u_out_ready(urd[i+1]), .u_out(ud[i+1]),
      .cfg(pcfg), .byp_push(byp_push[i]), .busy(pe_busy[i]));
  end

  kt_linear_pe #(.LIN_DEPTH(LIN_DEPTH)) u_lin (
    .clk, .rst_n,
    .s_valid(s_fire), .s_ready(ps_ready[NUM_TREES]), .s_pkt_id(next_id), .s_hdr,
    .r_valid(pr_valid[NUM_TREES]), .r_ready(pr_ready[NUM_TREES]),
    .r_res(pr_res[NUM_TREES]),
    .u_in_valid(uv[NUM_TREES]), .u_in_ready(urd[NUM_TREES]), .u_in(ud[NUM_TREES]),
    .u_out_valid(uv[NPE]), .u_out_ready(urd[NPE]), .u_out(ud[NPE]),
    .byp_push(byp_push[NUM_TREES]));

  // ------------------------------------------------------ result collection
  kt_resolver_tree #(.N(NPE), .ROB_AW(ROB_AW), .BAL_THRESH(BAL_THRESH)) u_collect (
    .clk, .rst_n, .in_valid(pr_valid), .in_ready(pr_ready), .in_res(pr_res),
    .out_valid(r_valid), .out_ready(r_ready), .out_res(r_res), .throttled);

  assign r_code = r_res.found ? RES_RULE_FOUND : RES_RULE_NOT_FOUND;

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(upd_mode && s_fire));
endmodule
