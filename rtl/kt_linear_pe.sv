// kt_linear_pe: the last PE of a classifier, a plain linear rule list.
//
// It guarantees that an insert never fails while space remains: a rule that
// no tree accepted is stored here, with no binth limit. Rules sit in a rule
// memory with a valid bit per slot; 'used' is one past the highest slot ever
// filled.
//  Search (s_*): one packet at a time; slots 0..used-1 are read one per
//    cycle and the highest-priority matching valid rule is kept. The result
//    leaves on r_*. Latency is about used + 2 cycles, so this PE slows down
//    the classifier as rules pile up here.
//  Update (u_in_*): a command already carried out by a tree goes through the
//    bypass FIFO. A pending INSERT takes the lowest free slot (found from the
//    valid bits); a pending DELETE scans for the rule ID and clears its slot.
//    As the final layer it turns what is still pending into UPDATE_FAILURE.
// The capacity LIN_DEPTH is this design's choice.
//
// From the published architecture: a last PE with linear search and no binth
// limit that takes rules no tree accepted. Own choices: the capacity, the
// valid-bit slots, the high-water-mark scan and one search at a time.
module kt_linear_pe
  import kt_pkg::*;
#(
  parameter int unsigned LIN_DEPTH = 1024,
  parameter int unsigned BYP_DEPTH = 4,
  localparam int unsigned AW = $clog2(LIN_DEPTH)
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
  output logic                byp_push    // an update entered the bypass FIFO
);
  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DONE, U_SCAN, U_INS, U_DONE} state_e;

  state_e               st;
  logic [LIN_DEPTH-1:0] valid;
  logic [AW:0]          used, idx;
  logic                 rd_q, rd_last_q;
  logic [AW-1:0]        rd_idx_q;
  header_t              hdr;
  sres_t                best;
  upd_t                 ures;
  rule_t                rdata;
  logic                 we;
  logic [AW-1:0]        waddr;
  rule_t                wdata;
  logic                 re;

  // lowest free slot
  logic          free_any;
  logic [AW-1:0] free_idx;
  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int i = LIN_DEPTH - 1; i >= 0; i--)
      if (!valid[i]) begin free_any = 1'b1; free_idx = AW'(i); end
  end

  kt_sdp_ram #(.WIDTH($bits(rule_t)), .DEPTH(LIN_DEPTH)) u_ram (
    .clk, .we, .waddr, .wdata, .re, .raddr(idx[AW-1:0]), .rdata);

  // bypass FIFO for updates done by a tree
  logic byp_in_valid, byp_in_ready, byp_out_valid, byp_out_ready;
  logic [$clog2(BYP_DEPTH+1)-1:0] byp_count;   // occupancy, for debug
  upd_t byp_out;
  assign byp_in_valid = u_in_valid && u_in.res == RES_UPDATE_SUCCESS;
  assign byp_push = byp_in_valid && byp_in_ready;
  kt_fifo #(.WIDTH($bits(upd_t)), .DEPTH(BYP_DEPTH)) u_bypass (
    .clk, .rst_n, .in_valid(byp_in_valid), .in_ready(byp_in_ready),
    .in_data(u_in), .out_valid(byp_out_valid), .out_ready(byp_out_ready),
    .out_data(byp_out), .count(byp_count));

  logic upd_take;
  assign upd_take   = u_in_valid && u_in.res != RES_UPDATE_SUCCESS &&
                      st == S_IDLE;
  assign u_in_ready = (u_in.res == RES_UPDATE_SUCCESS) ? byp_in_ready
                                                       : (st == S_IDLE);
  assign s_ready    = (st == S_IDLE) && !upd_take;

  assign r_valid = (st == S_DONE);
  assign r_res   = best;
  assign u_out_valid   = byp_out_valid || st == U_DONE;
  assign u_out         = byp_out_valid ? byp_out : ures;
  assign byp_out_ready = u_out_ready;

  assign re = (st == S_SCAN || st == U_SCAN) && idx < used;

  always_comb begin
    we    = 1'b0;
    waddr = free_idx;
    wdata = '0;
    if (st == U_INS && ures.op == OP_INSERT && free_any) begin
      we         = 1'b1;
      wdata.id   = ures.id;
      wdata.prio = ures.prio;
      wdata.r    = ures.r;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      valid <= '0;
      used  <= '0;
      rd_q  <= 1'b0;
    end else begin
      rd_q      <= re;
      rd_idx_q  <= idx[AW-1:0];
      rd_last_q <= re && (idx + 1'b1 >= used);
      case (st)
        S_IDLE: begin
          idx <= '0;
          if (upd_take) begin
            ures <= u_in;
            st   <= (u_in.op == OP_INSERT) ? U_INS : U_SCAN;
          end else if (s_valid) begin
            hdr          <= s_hdr;
            best         <= '0;
            best.pkt_id  <= s_pkt_id;
            st           <= (used == '0) ? S_DONE : S_SCAN;
          end
        end
        S_SCAN: begin
          if (re) idx <= idx + 1'b1;
          if (rd_q) begin
            if (valid[rd_idx_q] && rule_match(rdata.r, hdr) &&
                (!best.found || rdata.prio > best.prio)) begin
              best.found   <= 1'b1;
              best.rule_id <= rdata.id;
              best.prio    <= rdata.prio;
            end
            if (rd_last_q) st <= S_DONE;
          end
        end
        S_DONE: if (r_ready) st <= S_IDLE;
        U_SCAN: begin                              // delete: find the ID
          if (re) idx <= idx + 1'b1;
          if (used == '0) begin
            ures.res <= RES_UPDATE_FAILURE;
            st       <= U_DONE;
          end else if (rd_q) begin
            if (valid[rd_idx_q] && rdata.id == ures.id) begin
              valid[rd_idx_q] <= 1'b0;
              ures.res <= RES_UPDATE_SUCCESS;
              st       <= U_DONE;
            end else if (rd_last_q) begin
              ures.res <= RES_UPDATE_FAILURE;
              st       <= U_DONE;
            end
          end
        end
        U_INS: begin
          if (free_any) begin
            valid[free_idx] <= 1'b1;
            if ({1'b0, free_idx} >= used) used <= {1'b0, free_idx} + 1'b1;
            ures.res <= RES_UPDATE_SUCCESS;
          end else begin
            ures.res <= RES_UPDATE_FAILURE;
          end
          st <= U_DONE;
        end
        U_DONE: if (u_out_ready && !byp_out_valid) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
