// kt_pkg: types, constants and helper functions shared by the multi-tree
// packet classifier.
//
// A packet header is the IPv4 5-tuple (source/destination address, source/
// destination port, protocol). Each rule stores every field as a range
// [lo, hi]; prefixes and port ranges are converted to ranges by software
// before loading. A tree is kept in two memories: the node table (intermediate
// and leaf nodes) and the rule table (one entry per rule, chained in a
// singly linked list per leaf).
//
// An intermediate node selects up to three header bits, each named by a field
// index and a one-hot mask inside that field; the three bits form the index
// of the child below child_addr. A leaf holds the address of the first rule
// of its list. Which field numbering, bit order and widths are used is this
// design's choice; the entry contents follow the published node/rule formats.
//
// The node and rule entry contents follow the published description (leaf
// and valid flags, three selected bits, child or first-rule address; linked
// rules stored as ranges); field order, widths and the priority and ID
// fields are this design's own.
package kt_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned SEL_BITS  = 3;    // selectable bits per node
  localparam int unsigned NODE_AW   = 16;   // node table address
  localparam int unsigned RULE_AW   = 17;   // rule table address
  localparam int unsigned RULE_ID_W = 17;   // rule identifier
  localparam int unsigned PRIO_W    = 17;   // rule priority (larger wins)
  localparam int unsigned PKT_ID_W  = 16;   // packet sequence number
  localparam int unsigned MAX_TREES = 16;   // size of per-tree parameter arrays

  typedef int unsigned tree_arr_t [MAX_TREES];

  // Per-tree memory sizes. Trees 0..2 hold almost all rules; their sizes are
  // those of the acl1 100k-rule configuration. Later trees reuse tree 2's.
  localparam tree_arr_t DEF_NODE_LAW    = '{15, 12, 10, 10, 10, 10, 10, 10,
                                            10, 10, 10, 10, 10, 10, 10, 10};
  localparam tree_arr_t DEF_NODE_UDEPTH = '{8192, 0, 0, 0, 0, 0, 0, 0,
                                            0, 0, 0, 0, 0, 0, 0, 0};
  localparam tree_arr_t DEF_RULE_LAW    = '{17, 14, 12, 12, 12, 12, 12, 12,
                                            12, 12, 12, 12, 12, 12, 12, 12};
  localparam tree_arr_t DEF_RULE_UDEPTH = '{default: 0};
  localparam tree_arr_t DEF_BINTH       = '{default: 10};
  localparam tree_arr_t DEF_MAX_DEPTH   = '{default: 8};

  // -------------------------------------------------------------- header
  typedef struct packed {
    logic [31:0] sa;
    logic [31:0] da;
    logic [15:0] sp;
    logic [15:0] dp;
    logic [7:0]  proto;
  } header_t;

  typedef enum logic [2:0] {
    F_SA = 3'd0, F_DA = 3'd1, F_SP = 3'd2, F_DP = 3'd3, F_PROTO = 3'd4
  } field_e;

  // --------------------------------------------------------- node entry
  typedef struct packed {
    logic [2:0]  field;   // field_e value
    logic [31:0] mask;    // one-hot bit position inside the field, 0 = unused
  } bitsel_t;

  typedef struct packed {
    logic                         is_leaf;
    logic                         node_valid;
    bitsel_t [SEL_BITS-1:0]       sel;    // sel[2] is the MSB of the child index
    logic [RULE_AW-1:0]           addr;   // child_addr (intermediate) or
                                          // first rule address (leaf)
  } node_t;

  // --------------------------------------------------------- rule entry
  typedef struct packed {
    logic [31:0] sa_lo, sa_hi;
    logic [31:0] da_lo, da_hi;
    logic [15:0] sp_lo, sp_hi;
    logic [15:0] dp_lo, dp_hi;
    logic [7:0]  pr_lo, pr_hi;
  } ranges_t;

  typedef struct packed {
    logic                  next_valid;
    logic [RULE_AW-1:0]    next_addr;
    logic [RULE_ID_W-1:0]  id;
    logic [PRIO_W-1:0]     prio;
    ranges_t               r;
  } rule_t;

  // ------------------------------------------------- commands and results
  typedef enum logic [1:0] {
    OP_SEARCH = 2'd0, OP_INSERT = 2'd1, OP_DELETE = 2'd2
  } op_e;

  typedef enum logic [2:0] {
    RES_RULE_FOUND     = 3'd0,
    RES_RULE_NOT_FOUND = 3'd1,
    RES_UPDATE_SUCCESS = 3'd2,
    RES_UPDATE_FAILURE = 3'd3,
    RES_UPDATE_PENDING = 3'd4   // not yet done by any PE so far
  } res_e;

  // search result of one PE / one resolver
  typedef struct packed {
    logic [PKT_ID_W-1:0]  pkt_id;
    logic                 found;
    logic [RULE_ID_W-1:0] rule_id;
    logic [PRIO_W-1:0]    prio;
  } sres_t;

  // update command travelling from PE to PE
  typedef struct packed {
    op_e                  op;
    res_e                 res;
    logic [RULE_ID_W-1:0] id;
    logic [PRIO_W-1:0]    prio;
    ranges_t              r;
  } upd_t;

  // job entering the Node Searcher
  typedef struct packed {
    logic                is_upd;
    logic [PKT_ID_W-1:0] pkt_id;
    header_t             hdr;
    upd_t                upd;
  } ns_job_t;

  // traversal result leaving the Node Searcher
  typedef struct packed {
    logic                is_upd;
    logic [PKT_ID_W-1:0] pkt_id;
    header_t             hdr;
    upd_t                upd;
    logic                hit;         // reached a valid leaf
    logic                fail;        // update kicked out (wildcard / depth)
    logic [NODE_AW-1:0]  leaf_addr;   // last node read (leaf or empty node)
    node_t               leaf_node;
    logic                parent_valid;
    logic [NODE_AW-1:0]  parent_addr; // one level above
    node_t               parent_node;
  } ns_out_t;

  // host table-load port of one PE
  typedef enum logic [1:0] {
    CFG_NODE = 2'd0, CFG_RULE = 2'd1, CFG_SPARE = 2'd2
  } cfg_tbl_e;

  typedef struct packed {
    logic               we;
    cfg_tbl_e           tbl;
    logic [RULE_AW-1:0] addr;   // CFG_SPARE: first spare rule entry
    node_t              node;
    rule_t              rule;
  } cfg_t;

  // ------------------------------------------------------------ helpers
  function automatic logic [31:0] field_val(header_t h, logic [2:0] f);
    case (f)
      F_SA:    return h.sa;
      F_DA:    return h.da;
      F_SP:    return {16'd0, h.sp};
      F_DP:    return {16'd0, h.dp};
      F_PROTO: return {24'd0, h.proto};
      default: return 32'd0;
    endcase
  endfunction

  function automatic logic sel_bit(header_t h, bitsel_t s);
    return |(field_val(h, s.field) & s.mask);
  endfunction

  // child index formed from the selected bits, sel[2] most significant
  function automatic logic [SEL_BITS-1:0] child_index(header_t h, node_t n);
    logic [SEL_BITS-1:0] idx;
    for (int i = 0; i < SEL_BITS; i++) idx[i] = sel_bit(h, n.sel[i]);
    return idx;
  endfunction

  function automatic header_t lo_header(ranges_t r);
    header_t h;
    h.sa = r.sa_lo; h.da = r.da_lo; h.sp = r.sp_lo; h.dp = r.dp_lo;
    h.proto = r.pr_lo;
    return h;
  endfunction

  function automatic header_t hi_header(ranges_t r);
    header_t h;
    h.sa = r.sa_hi; h.da = r.da_hi; h.sp = r.sp_hi; h.dp = r.dp_hi;
    h.proto = r.pr_hi;
    return h;
  endfunction

  // A selected bit is fixed (not a wildcard) for a rule when every value of
  // the range agrees on it: lo and hi are equal on that bit and all above.
  function automatic logic sel_fixed(ranges_t r, bitsel_t s);
    logic [31:0] diff;
    diff = field_val(lo_header(r), s.field) ^ field_val(hi_header(r), s.field);
    return (diff & ~(s.mask - 32'd1)) == 32'd0;
  endfunction

  function automatic logic node_fixed(ranges_t r, node_t n);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < SEL_BITS; i++) ok &= sel_fixed(r, n.sel[i]);
    return ok;
  endfunction

  function automatic logic rule_match(ranges_t r, header_t h);
    return (h.sa >= r.sa_lo) && (h.sa <= r.sa_hi) &&
           (h.da >= r.da_lo) && (h.da <= r.da_hi) &&
           (h.sp >= r.sp_lo) && (h.sp <= r.sp_hi) &&
           (h.dp >= r.dp_lo) && (h.dp <= r.dp_hi) &&
           (h.proto >= r.pr_lo) && (h.proto <= r.pr_hi);
  endfunction

endpackage
