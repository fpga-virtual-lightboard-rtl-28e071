// Testbench for bitorder: random bytes go in least significant dibit first;
// they must come out most significant dibit first, in order, with the first
// output dibit in the cycle after the byte's last input dibit.
module tb_bitorder;
  logic clk = 0, rst = 1, axiiv = 0, axiov;
  logic [1:0] axiid = 0, axiod;
  int checks = 0, failures = 0;
  bitorder dut (.clk, .rst, .axiiv, .axiid, .axiov, .axiod);
  always #5 clk = ~clk;

  logic [1:0] exp_q [$];
  int cyc = 0, first_out = -1, last_in = -1;
  always @(posedge clk) if (!rst) begin
    #1; cyc++;
    if (axiov) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (exp_q.size() == 0 || axiod != exp_q[0]) begin failures++; $display("FAIL dibit %0d", axiod); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int f = 0; f < 5; f++) begin
      int n;
      n = int'($urandom_range(40, 2));
      for (int i = 0; i < n; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        for (int d = 0; d < 4; d++) begin
          @(negedge clk); axiiv = 1; axiid = b[2*d +: 2];
          if (f == 0 && i == 0 && d == 3) last_in = cyc;
        end
        exp_q.push_back(b[7:6]); exp_q.push_back(b[5:4]); exp_q.push_back(b[3:2]); exp_q.push_back(b[1:0]);
      end
      @(negedge clk); axiiv = 0;
      repeat (10) @(negedge clk);
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d dibits missing", exp_q.size()); end
    checks++; if (first_out - last_in != 1) begin failures++; $display("FAIL latency %0d", first_out - last_in); end
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
