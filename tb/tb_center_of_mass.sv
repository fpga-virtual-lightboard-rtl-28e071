// Testbench for center_of_mass: several frames of random masked pixels;
// the result must equal the integer mean of x and of y, arrive within 27
// cycles of the frame end, and an empty frame must give no result.
module tb_center_of_mass;
  logic clk = 0, rst = 1, valid_in = 0, tabulate_in = 0, valid_out;
  logic [8:0] x_in = 0, x_out;
  logic [7:0] y_in = 0, y_out;
  int checks = 0, failures = 0;
  center_of_mass dut (.clk, .rst, .x_in, .y_in, .valid_in, .tabulate_in, .x_out, .y_out, .valid_out);
  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic frame(int n, int cx, int cy, int spread);
    longint sx = 0, sy = 0;
    int wait_c = 0;
    for (int i = 0; i < n; i++) begin
      int x, y;
      x = cx + int'($urandom_range(2*spread)) - spread; if (x < 0) x = 0; if (x > 319) x = 319;
      y = cy + int'($urandom_range(2*spread)) - spread; if (y < 0) y = 0; if (y > 239) y = 239;
      @(negedge clk); x_in = 9'(x); y_in = 8'(y); valid_in = 1; sx += x; sy += y;
      @(negedge clk); valid_in = 0;
    end
    @(negedge clk); tabulate_in = 1;
    @(negedge clk); tabulate_in = 0;
    while (!valid_out && wait_c < 60) begin @(posedge clk); #1; wait_c++; end
    if (n == 0) chk(!valid_out, "empty frame gives no result");
    else begin
      chk(valid_out, "result arrived");
      chk(wait_c <= 27, $sformatf("latency %0d", wait_c));
      chk(x_out == 9'(sx / n) && y_out == 8'(sy / n),
          $sformatf("com %0d,%0d exp %0d,%0d", x_out, y_out, sx / n, sy / n));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    frame(1, 5, 7, 0);
    frame(200, 160, 120, 30);
    frame(0, 0, 0, 0);
    frame(3000, 300, 230, 40);
    frame(57, 20, 200, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
