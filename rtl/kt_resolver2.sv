// kt_resolver2: two-input search result resolver, the building block of the
// hierarchical result collection.
//
// Each input channel brings per-packet results out of packet order. A
// channel writes each result into its own reorder memory at the low ROB_AW
// bits of the packet ID. Whenever both memories hold the result for the next
// packet ID in sequence, both are read, the one with the higher-priority
// matching rule wins (not found loses to found), and it is pushed into the
// output FIFO; the output is therefore in packet order.
// Flow control on each input: the slot must be free and the ID must lie
// within the window of 2^ROB_AW IDs starting at the next ID to read. The
// dataflow balancer also holds back a channel that is more than BAL_THRESH
// results ahead of the other, unless that channel still lacks the next ID;
// throttle shows when it does so.
// BYPASS = 1 is used when the second input would come from an empty tree:
// the second memory is not built, channel 1 is ignored (its ready follows
// channel 0) and channel 0's results pass through in order.
// Window-based flow control and the balancer rule are this design's choices.
//
// From the published architecture: one reorder memory per channel indexed by
// packet ID, in-order paired reads, priority comparison, an output FIFO, a
// dataflow balancer and a bypass mode. Own choices: reading as soon as one
// result per channel is present, the balancer rule and threshold, and the
// window check.
module kt_resolver2
  import kt_pkg::*;
#(
  parameter int unsigned ROB_AW     = 4,
  parameter bit          BYPASS     = 1'b0,
  parameter int unsigned BAL_THRESH = 4,
  parameter int unsigned OUT_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  in_valid,
  output logic [1:0]  in_ready,
  input  sres_t [1:0] in_res,
  output logic        out_valid,
  input  logic        out_ready,
  output sres_t       out_res,
  output logic [1:0]  throttle
);
  localparam int unsigned D  = 1 << ROB_AW;
  localparam int unsigned NCH = BYPASS ? 1 : 2;

  logic [PKT_ID_W-1:0] rd_seq;
  logic [ROB_AW-1:0]   head;
  sres_t               rob  [NCH][D];
  logic [D-1:0]        vld  [NCH];
  logic [ROB_AW:0]     occ  [NCH];
  logic [NCH-1:0]      acc, head_ok;
  logic                pop, fifo_ready;
  sres_t               a, b, win;

  assign head = rd_seq[ROB_AW-1:0];

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      automatic logic [PKT_ID_W-1:0] gap = in_res[c].pkt_id - rd_seq;
      automatic logic [ROB_AW-1:0]   slot = in_res[c].pkt_id[ROB_AW-1:0];
      automatic logic                ahead;
      head_ok[c] = vld[c][head];
      ahead = (NCH == 2) && head_ok[c] &&
              (int'(occ[c]) > int'(occ[NCH-1-c]) + int'(BAL_THRESH));
      throttle[c] = ahead && in_valid[c];
      acc[c] = in_valid[c] && !vld[c][slot] && (gap < PKT_ID_W'(D)) && !ahead;
    end
    if (NCH == 1) throttle[1] = 1'b0;
  end

  always_comb begin
    a = rob[0][head];
    b = rob[NCH-1][head];
    win = a;
    if (b.found && (!a.found || b.prio > a.prio)) win = b;
    win.pkt_id = rd_seq;
  end

  assign pop = (&head_ok) && fifo_ready;

  always_comb begin
    in_ready[0] = acc[0] || !in_valid[0];
    in_ready[1] = (NCH == 2) ? (acc[NCH-1] || !in_valid[1]) : in_ready[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_seq <= '0;
      for (int c = 0; c < NCH; c++) begin vld[c] <= '0; occ[c] <= '0; end
    end else begin
      if (pop) rd_seq <= rd_seq + 1'b1;
      for (int c = 0; c < NCH; c++) begin
        if (acc[c]) vld[c][in_res[c].pkt_id[ROB_AW-1:0]] <= 1'b1;
        if (pop)    vld[c][head] <= 1'b0;
        occ[c] <= occ[c] + (ROB_AW+1)'(acc[c]) - (ROB_AW+1)'(pop);
      end
    end
  end

  always_ff @(posedge clk)
    for (int c = 0; c < NCH; c++)
      if (acc[c]) rob[c][in_res[c].pkt_id[ROB_AW-1:0]] <= in_res[c];

  kt_fifo #(.WIDTH($bits(sres_t)), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(pop), .in_ready(fifo_ready), .in_data(win),
    .out_valid, .out_ready, .out_data(out_res), .count());

  // an accepted result never overwrites one still waiting
  for (genvar c = 0; c < NCH; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     acc[c] |-> !vld[c][in_res[c].pkt_id[ROB_AW-1:0]]);
  end
endmodule
