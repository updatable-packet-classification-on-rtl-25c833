// Testbench for kt_table_ram: a 16 + 5 entry table (lower 2^4, upper 5).
// Every implemented address is written and read back; addresses beyond the
// implemented depth must read zero and must not alias lower entries.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_table_ram;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] shadow [64];
  int checks = 0, failures = 0;

  kt_table_ram #(.WIDTH(12), .AW(6), .LAW(4), .UDEPTH(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); we = 1; waddr = 6'(i); wdata = 12'($urandom() | 1);
        if (i < 21) shadow[i] = wdata;      // only 21 entries exist
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); re = 1; raddr = 6'(i);
        @(posedge clk); #1; re = 0;
        checks++;
        if (rdata !== shadow[i]) begin
          failures++; $display("addr %0d got %h exp %h", i, rdata, shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
