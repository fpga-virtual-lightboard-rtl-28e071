// Testbench for mirror: random and corner screen positions; the address
// must be row*320 + (319 - col) with col = h*5/16, row = v*5/16, one cycle
// later, and 0 outside the visible area.
module tb_mirror;
  logic clk = 0;
  logic [10:0] hcount = 0;
  logic [9:0] vcount = 0;
  logic [16:0] pixel_addr;
  int checks = 0, failures = 0;
  mirror dut (.clk, .hcount, .vcount, .pixel_addr);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int h, v, e;
      h = int'($urandom_range(1343)); v = int'($urandom_range(805));
      if (i == 0) begin h = 0; v = 0; end
      if (i == 1) begin h = 1023; v = 767; end
      @(negedge clk); hcount = 11'(h); vcount = 10'(v);
      e = (h < 1024 && v < 768) ? (v * 5 / 16) * 320 + 319 - (h * 5 / 16) : 0;
      @(posedge clk); #1;
      checks++;
      if (pixel_addr != 17'(e)) begin failures++; $display("FAIL h=%0d v=%0d addr=%0d exp %0d", h, v, pixel_addr, e); end
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
