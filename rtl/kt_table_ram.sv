// kt_table_ram: node or rule table memory built from a lower and an upper
// part, so that a table needing 2^n + k entries does not cost 2^(n+1).
//
// Addresses below 2^LAW go to the lower part (depth 2^LAW); addresses 2^LAW
// and above go to the upper part at offset addr - 2^LAW (depth UDEPTH, spare
// entries for inserted rules included). UDEPTH = 0 builds only the lower part.
// Reading an address beyond the implemented depth returns zero. Ports and
// timing are those of kt_sdp_ram: one write, one registered read.
//
// The split into a lower part of 2^LAW entries and an upper part for the
// addresses above follows the published memory organisation; out-of-range
// reads returning zero is this design's own.
module kt_table_ram #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned AW     = 6,    // external address width
  parameter int unsigned LAW    = 4,    // lower part holds 2^LAW entries
  parameter int unsigned UDEPTH = 4     // upper part entries
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  localparam int unsigned LDEPTH = 1 << LAW;
  localparam int unsigned UAW = (UDEPTH > 1) ? $clog2(UDEPTH) : 1;

  logic             w_up, r_up, r_up_q, r_oob_q;
  logic [WIDTH-1:0] rdata_lo;

  // address split
  assign w_up = (AW > LAW) ? (waddr >= AW'(LDEPTH)) : 1'b0;
  assign r_up = (AW > LAW) ? (raddr >= AW'(LDEPTH)) : 1'b0;

  kt_sdp_ram #(.WIDTH(WIDTH), .DEPTH(LDEPTH)) u_lower (
    .clk, .we(we && !w_up), .waddr(waddr[LAW-1:0]), .wdata,
    .re(re && !r_up), .raddr(raddr[LAW-1:0]), .rdata(rdata_lo));

  if (UDEPTH > 0) begin : g_upper
    logic [AW-1:0]    woff, roff;
    logic [WIDTH-1:0] rdata_up;
    logic             r_in, w_in;
    assign woff = waddr - AW'(LDEPTH);
    assign roff = raddr - AW'(LDEPTH);
    assign w_in = (woff < AW'(UDEPTH));
    assign r_in = (roff < AW'(UDEPTH));
    kt_sdp_ram #(.WIDTH(WIDTH), .DEPTH(UDEPTH)) u_upper (
      .clk, .we(we && w_up && w_in), .waddr(woff[UAW-1:0]), .wdata,
      .re(re && r_up && r_in), .raddr(roff[UAW-1:0]), .rdata(rdata_up));
    always_ff @(posedge clk) if (re) r_oob_q <= r_up && !r_in;
    assign rdata = r_oob_q ? '0 : (r_up_q ? rdata_up : rdata_lo);
  end else begin : g_no_upper
    always_ff @(posedge clk) if (re) r_oob_q <= r_up;
    assign rdata = r_oob_q ? '0 : rdata_lo;
  end

  always_ff @(posedge clk) if (re) r_up_q <= r_up;
endmodule
