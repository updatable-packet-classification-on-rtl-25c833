// Testbench for kt_rr_arbiter: random request patterns; the grant must be
// the first requester at or after the position following the previous
// winner (fairness), one-hot, and present whenever anybody requests.
//
// Reference values come from the models in this testbench, written from the
// rule semantics and independent of the RTL; reduced sizes, stimulus mix and
// mechanism counts are the testbench's own.
module tb_kt_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, advance;
  logic [N-1:0] req, gnt;
  logic [2:0] gnt_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  kt_rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    int served [N];
    req = '0; advance = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = (t < 1000) ? N'($urandom()) : '1;
      advance = $urandom_range(0, 3) != 0;
      exp = -1;
      for (int k = 0; k < N; k++)
        if (exp < 0 && req[(ptr + k) % N]) exp = (ptr + k) % N;
      #1;
      checks++;
      if (exp < 0 ? (gnt != 0) : (gnt != (N'(1) << exp) || gnt_idx != 3'(exp))) begin
        failures++; $display("t=%0d req=%b gnt=%b exp=%0d", t, req, gnt, exp);
      end
      if (advance && exp >= 0) begin
        ptr = (exp + 1) % N;
        if (t >= 1000) served[exp]++;
      end
    end
    // with all requesting, service must be shared evenly
    for (int k = 0; k < N; k++) begin
      checks++;
      if (served[k] < served[0] - 1 || served[k] > served[0] + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
