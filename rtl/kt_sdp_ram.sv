// kt_sdp_ram: simple dual-port memory, one write port and one read port.
//
// The read is registered: rdata holds mem[raddr] from the cycle after re was
// high and keeps it otherwise. A write and a read of the same address in the
// same cycle return the old contents. The array is cleared at time zero so
// that unused entries read as invalid nodes/rules. It is the generic storage
// for node tables, rule tables and reorder buffers; the FPGA tools map it to
// distributed, block or ultra RAM by size.
//
// The published design leaves the RAM type to each table's size; the one-
// cycle read and the old-data-on-collision behaviour are this design's own.
module kt_sdp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
