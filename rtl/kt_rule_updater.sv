// kt_rule_updater: inserts or deletes one rule in one tree.
//
// It receives the Node Searcher's result for an update: the leaf (or empty
// node) the rule falls into, with the node's address and contents.
//  INSERT: walks the leaf's rule list to count its rules. If the rule was
//    kicked out during traversal, the leaf already holds BINTH rules, or no
//    free rule entry is left, the update stays pending (passed to the next
//    PE). Otherwise a free entry is taken - first from the list of entries
//    freed by deletes, else from the spare region starting at the pointer
//    set by the host - the rule is written there linked in front of the old
//    first rule, and the node entry is rewritten as a valid leaf pointing to
//    it (an empty node becomes a new leaf).
//  DELETE: walks the list looking for the rule ID. When found, the rule is
//    unlinked (the previous rule's link or the leaf's first-rule pointer is
//    rewritten; a leaf left empty is marked invalid) and its entry is pushed
//    onto the free list. Not found leaves the update pending.
// Rule table reads go through the Rule Processor's arbiter (rd_req/rd_gnt,
// data one cycle after the grant). Writes use the tables' write ports
// directly; updates never run together with searches. The result leaves on
// the out stream with res = UPDATE_SUCCESS, or unchanged (pending).
// Insertion at the list head and the free-list scheme are this design's
// choices; binth and the node/rule formats follow the published design.
//
// From the published architecture: insert and delete in a tree with the
// binth limit and a spare region for new rules. Own choices: inserting at
// the head of the list, the free list of deleted entries and the exact walk
// and write sequence.
module kt_rule_updater
  import kt_pkg::*;
#(
  parameter int unsigned BINTH      = 10,
  parameter int unsigned RULE_DEPTH = 1024   // implemented rule entries
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  ns_out_t            in,
  output logic               rd_req,
  output logic [RULE_AW-1:0] rd_addr,
  input  logic               rd_gnt,
  input  rule_t              rd_data,
  output logic               rule_we,
  output logic [RULE_AW-1:0] rule_waddr,
  output rule_t              rule_wdata,
  output logic               node_we,
  output logic [NODE_AW-1:0] node_waddr,
  output node_t              node_wdata,
  input  logic               cfg_spare_we,
  input  logic [RULE_AW-1:0] cfg_spare_addr,
  output logic               out_valid,
  input  logic               out_ready,
  output upd_t               out
);
  typedef enum logic [2:0] {
    S_IDLE, S_WALK, S_WALK_W, S_ALLOC, S_ALLOC_W, S_WRITE, S_FREE, S_DONE
  } state_e;

  state_e             st;
  ns_out_t            job;
  upd_t               res;
  logic [RULE_AW-1:0] cur, prev, new_addr;
  logic               prev_valid;
  rule_t              prev_rule, cur_rule;
  logic [RULE_AW:0]   cnt;
  logic               free_valid;
  logic [RULE_AW-1:0] free_head;
  logic [RULE_AW:0]   spare_ptr;

  assign in_ready  = (st == S_IDLE);
  assign out_valid = (st == S_DONE);
  assign out       = res;
  assign rd_req    = (st == S_WALK) || (st == S_ALLOC);
  assign rd_addr   = (st == S_ALLOC) ? free_head : cur;

  always_comb begin
    rule_we    = 1'b0;
    rule_waddr = new_addr;
    rule_wdata = '0;
    node_we    = 1'b0;
    node_waddr = job.leaf_addr;
    node_wdata = job.leaf_node;
    if (st == S_WRITE) begin
      if (job.upd.op == OP_INSERT) begin
        rule_we               = 1'b1;
        rule_wdata.next_valid = job.hit;
        rule_wdata.next_addr  = job.hit ? job.leaf_node.addr : '0;
        rule_wdata.id         = job.upd.id;
        rule_wdata.prio       = job.upd.prio;
        rule_wdata.r          = job.upd.r;
        node_we               = 1'b1;
        node_wdata.is_leaf    = 1'b1;
        node_wdata.node_valid = 1'b1;
        if (!job.hit) node_wdata.sel = '0;
        node_wdata.addr       = new_addr;
      end else if (prev_valid) begin            // delete, unlink in the list
        rule_we               = 1'b1;
        rule_waddr            = prev;
        rule_wdata            = prev_rule;
        rule_wdata.next_valid = cur_rule.next_valid;
        rule_wdata.next_addr  = cur_rule.next_addr;
      end else begin                            // delete, first rule of leaf
        node_we               = 1'b1;
        node_wdata.node_valid = cur_rule.next_valid;
        node_wdata.addr       = cur_rule.next_addr;
      end
    end else if (st == S_FREE) begin            // push onto the free list
      rule_we               = 1'b1;
      rule_waddr            = cur;
      rule_wdata            = cur_rule;
      rule_wdata.next_valid = free_valid;
      rule_wdata.next_addr  = free_head;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      free_valid <= 1'b0;
      free_head  <= '0;
      spare_ptr  <= '0;
    end else begin
      if (cfg_spare_we) begin
        spare_ptr  <= {1'b0, cfg_spare_addr};
        free_valid <= 1'b0;
      end
      case (st)
        S_IDLE: if (in_valid) begin
          job        <= in;
          res        <= in.upd;
          cur        <= in.leaf_node.addr;
          prev_valid <= 1'b0;
          cnt        <= '0;
          if (in.fail) st <= S_DONE;
          else if (in.hit) st <= S_WALK;
          else if (in.upd.op == OP_INSERT) st <= S_ALLOC;   // empty node
          else st <= S_DONE;                                // nothing here
        end
        S_WALK:   if (rd_gnt) st <= S_WALK_W;
        S_WALK_W: begin
          cur_rule <= rd_data;
          cnt      <= cnt + 1'b1;
          if (job.upd.op == OP_DELETE && rd_data.id == job.upd.id) begin
            st <= S_WRITE;
          end else if (rd_data.next_valid) begin
            prev_valid <= 1'b1;
            prev       <= cur;
            prev_rule  <= rd_data;
            cur        <= rd_data.next_addr;
            st         <= S_WALK;
          end else if (job.upd.op == OP_INSERT && int'(cnt) + 1 < BINTH) begin
            st <= S_ALLOC;
          end else begin
            st <= S_DONE;                      // full leaf / not found
          end
        end
        S_ALLOC: begin
          if (free_valid) begin
            if (rd_gnt) st <= S_ALLOC_W;
          end else if (int'(spare_ptr) < RULE_DEPTH) begin
            new_addr  <= spare_ptr[RULE_AW-1:0];
            spare_ptr <= spare_ptr + 1'b1;
            st        <= S_WRITE;
          end else begin
            st <= S_DONE;                      // table full
          end
        end
        S_ALLOC_W: begin
          new_addr   <= free_head;
          free_head  <= rd_data.next_addr;
          free_valid <= rd_data.next_valid;
          st         <= S_WRITE;
        end
        S_WRITE: begin
          res.res <= RES_UPDATE_SUCCESS;
          st <= (job.upd.op == OP_DELETE) ? S_FREE : S_DONE;
        end
        S_FREE: begin
          free_head  <= cur;
          free_valid <= 1'b1;
          st         <= S_DONE;
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready |-> in.is_upd);
endmodule
