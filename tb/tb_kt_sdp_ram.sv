// Testbench for kt_sdp_ram: random writes and reads against a shadow array,
// checking the one-cycle read latency and read-before-write behaviour.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_sdp_ram;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [64];
  int checks = 0, failures = 0;

  kt_sdp_ram #(.WIDTH(16), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 16'($urandom());
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      re = 1; raddr = 6'($urandom());
      we = $urandom_range(0, 1); waddr = ($urandom_range(0, 1) == 1) ? raddr : 6'($urandom());
      wdata = 16'($urandom());
      exp = shadow[raddr];                 // old contents on a collision
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++; $display("read %0d: got %h exp %h", raddr, rdata, exp);
      end
      re = 0; we = 0;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin failures++; $display("rdata not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
