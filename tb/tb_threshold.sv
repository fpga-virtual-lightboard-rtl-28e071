// Testbench for threshold: random Cr values and limits; mask must be set
// exactly when Cr[9:6] lies in [lower, upper], one cycle later.
module tb_threshold;
  logic clk = 0, rst = 1, mask;
  logic [9:0] cr = 0;
  logic [3:0] lower = 0, upper = 0;
  int checks = 0, failures = 0;
  threshold dut (.clk, .rst, .cr, .lower, .upper, .mask);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      int v;
      @(negedge clk);
      cr = 10'($urandom); lower = 4'($urandom); upper = 4'($urandom);
      if (i < 16) begin cr = 10'(i << 6); lower = 4'hA; upper = 4'hF; end
      v = cr / 64;
      @(posedge clk); #1;
      checks++;
      if (mask !== (v >= lower && v <= upper)) begin
        failures++; $display("FAIL cr=%0d lo=%0d hi=%0d mask=%0d", cr, lower, upper, mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
