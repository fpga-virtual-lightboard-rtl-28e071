// Testbench for scale: pixels inside the 1024x768 window pass, outside
// they become black (8'h00), one cycle later.
module tb_scale;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [7:0] frame_pixel = 0, scaled_pixel;
  int checks = 0, failures = 0;
  scale dut (.clk, .hcount, .vcount, .frame_pixel, .scaled_pixel);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int h, v; logic [7:0] e;
      h = int'($urandom_range(1343)); v = int'($urandom_range(805));
      @(negedge clk); hcount = 11'(h); vcount = 10'(v); frame_pixel = 8'($urandom) | 8'h01;
      e = (h < 1024 && v < 768) ? frame_pixel : 8'h00;
      @(posedge clk); #1;
      checks++;
      if (scaled_pixel != e) begin failures++; $display("FAIL h=%0d v=%0d", h, v); end
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
