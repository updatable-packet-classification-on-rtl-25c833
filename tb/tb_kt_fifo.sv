// Testbench for kt_fifo: random push/pop traffic against a queue model,
// checking order, full/empty flags and the occupancy count.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [2:0] count;
  logic [7:0] q [$];
  int checks = 0, failures = 0;

  kt_fifo #(.WIDTH(8), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 1);
      in_data   = 8'($urandom());
      out_ready = (t % 600 < 300) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (count != 3'(q.size()) || in_ready != (q.size() < 4) ||
          out_valid != (q.size() > 0)) begin
        failures++; $display("flags: count=%0d model=%0d", count, q.size());
      end
      if (out_valid && out_data != q[0]) begin
        failures++; $display("data %h exp %h", out_data, q[0]);
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
