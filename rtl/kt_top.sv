// kt_top: NUM_CORES independent classifier cores on one device.
//
// Each core has its own packet search, search result, rule update and
// update result ports (index = core); spreading traffic over the cores is
// left to the surrounding system. One host write bus loads the node and rule
// tables of every PE: cfg_core and cfg_pe select the destination.
// Everything else is described in kt_classifier.
//
// Several cores per device follow the published implementation (six for most
// rule sets); how traffic is spread over them is not described, so each core
// keeps its own ports, and the shared host write bus is this design's own.
module kt_top
  import kt_pkg::*;
#(
  parameter int unsigned NUM_CORES = 6,
  parameter int unsigned NUM_TREES = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic    [NUM_CORES-1:0]  s_valid,
  output logic    [NUM_CORES-1:0]  s_ready,
  input  header_t [NUM_CORES-1:0]  s_hdr,
  output logic    [NUM_CORES-1:0]  r_valid,
  input  logic    [NUM_CORES-1:0]  r_ready,
  output sres_t   [NUM_CORES-1:0]  r_res,
  output res_e    [NUM_CORES-1:0]  r_code,
  input  logic    [NUM_CORES-1:0]  u_valid,
  output logic    [NUM_CORES-1:0]  u_ready,
  input  upd_t    [NUM_CORES-1:0]  u_cmd,
  output logic    [NUM_CORES-1:0]  ur_valid,
  input  logic    [NUM_CORES-1:0]  ur_ready,
  output upd_t    [NUM_CORES-1:0]  ur_res,
  input  cfg_t                     cfg,
  input  logic    [3:0]            cfg_core,
  input  logic    [4:0]            cfg_pe,
  output logic    [NUM_CORES-1:0]  upd_mode,
  output logic    [NUM_CORES-1:0]  throttled,
  output logic    [NUM_CORES-1:0][NUM_TREES:0] byp_push
);
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    cfg_t ccfg;
    always_comb begin
      ccfg    = cfg;
      ccfg.we = cfg.we && (int'(cfg_core) == c);
    end
    kt_classifier #(.NUM_TREES(NUM_TREES)) u_core (
      .clk, .rst_n,
      .s_valid(s_valid[c]), .s_ready(s_ready[c]), .s_hdr(s_hdr[c]),
      .r_valid(r_valid[c]), .r_ready(r_ready[c]), .r_res(r_res[c]),
      .r_code(r_code[c]),
      .u_valid(u_valid[c]), .u_ready(u_ready[c]), .u_cmd(u_cmd[c]),
      .ur_valid(ur_valid[c]), .ur_ready(ur_ready[c]), .ur_res(ur_res[c]),
      .cfg(ccfg), .cfg_pe, .upd_mode(upd_mode[c]), .throttled(throttled[c]),
      .byp_push(byp_push[c]));
  end
endmodule
