// kt_resolver_tree: collects the search results of N PEs into one in-order
// stream through levels of kt_resolver2.
//
// Level l has ceil(N / 2^l) resolvers; resolver j of a level merges outputs
// 2j and 2j+1 of the level below. When 2j+1 does not exist (the tree count is
// padded up to a power of two with empty trees) the resolver is built in
// bypass mode with a single reorder memory. ceil(log2 N) levels are built;
// N = 1 is a wire. The output carries the best rule of all PEs per packet,
// in packet order.
//
// The level structure and the bypass-mode padding for odd counts follow the
// published architecture; the port layout and the throttled summary output
// are this design's own.
module kt_resolver_tree
  import kt_pkg::*;
#(
  parameter int unsigned N          = 11,
  parameter int unsigned ROB_AW     = 4,
  parameter int unsigned BAL_THRESH = 4,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  output logic [N-1:0]  in_ready,
  input  sres_t [N-1:0] in_res,
  output logic          out_valid,
  input  logic          out_ready,
  output sres_t         out_res,
  output logic          throttled   // some balancer is holding a channel
);
  // number of streams at level l
  function automatic int unsigned cnt(int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  logic  [N-1:0] v [LEVELS+1];
  logic  [N-1:0] r [LEVELS+1];
  sres_t [N-1:0] d [LEVELS+1];
  logic  [N-1:0] thr [LEVELS+1];

  assign v[0] = in_valid;
  assign d[0] = in_res;
  assign in_ready = r[0];
  assign thr[0] = '0;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    for (genvar j = 0; j < N; j++) begin : g_node
      if (j < cnt(l)) begin : g_used
        localparam bit BYP = (2 * j + 1 >= cnt(l - 1));
        logic [1:0]  iv, ir, th;
        sres_t [1:0] id;
        assign iv[0] = v[l-1][2*j];
        assign id[0] = d[l-1][2*j];
        assign iv[1] = BYP ? 1'b0 : v[l-1][(2*j+1) % N];
        assign id[1] = d[l-1][(2*j+1) % N];
        assign r[l-1][2*j] = ir[0];
        if (!BYP) begin : g_pair
          assign r[l-1][2*j+1] = ir[1];
        end
        kt_resolver2 #(.ROB_AW(ROB_AW), .BYPASS(BYP),
                       .BAL_THRESH(BAL_THRESH)) u_res (
          .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_res(id),
          .out_valid(v[l][j]), .out_ready(r[l][j]), .out_res(d[l][j]),
          .throttle(th));
        assign thr[l][j] = |th;
      end else begin : g_unused
        assign v[l][j]   = 1'b0;
        assign d[l][j]   = '0;
        assign thr[l][j] = 1'b0;
      end
    end
    // ready of unused streams of the level below
    for (genvar j = 0; j < N; j++) begin : g_rdy
      if (j >= cnt(l - 1)) begin : g_x
        assign r[l-1][j] = 1'b0;
      end
    end
  end

  assign out_valid     = v[LEVELS][0];
  assign out_res       = d[LEVELS][0];
  assign r[LEVELS][0]  = out_ready;
  for (genvar j = 1; j < N; j++) begin : g_top_rdy
    assign r[LEVELS][j] = 1'b0;
  end

  always_comb begin
    throttled = 1'b0;
    for (int l = 0; l <= LEVELS; l++) throttled |= |thr[l];
  end
endmodule
