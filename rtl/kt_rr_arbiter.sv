// kt_rr_arbiter: round-robin arbiter. All requesters have equal priority;
// the search starts one past the last winner. gnt/gnt_idx are combinational
// from req and the pointer; the pointer moves past the winner in the cycle
// in which advance is high (the grant was used).
//
// Round-robin arbitration among equal-priority search units is from the
// published architecture; the rotating-pointer implementation is a common
// one.
module kt_rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx
);
  logic [IW-1:0] ptr;   // highest priority requester

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      // scan from ptr upward, the lowest offset wins
      int unsigned j;
      j = (int'(ptr) + k) % N;
      if (req[j]) begin
        gnt     = '0;
        gnt[j]  = 1'b1;
        gnt_idx = IW'(j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && |req)
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (|req) == (|gnt));
endmodule
