// Testbench for rgb_to_ycrcb: random colours, compared with the BT.601
// equations evaluated in floating point, within 3 LSB, and the 3-cycle
// latency.
module tb_rgb_to_ycrcb;
  logic clk = 0;
  logic [9:0] r = 0, g = 0, b = 0, y, cr, cb;
  int checks = 0, failures = 0;
  rgb_to_ycrcb dut (.clk, .r, .g, .b, .y, .cr, .cb);
  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic int clip(real v);
    if (v < 0) return 0;
    if (v > 1023) return 1023;
    return int'($floor(v));
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      real ey, ecr, ecb;
      @(negedge clk);
      r = (i == 0) ? 10'd1023 : 10'($urandom); g = (i == 0) ? 10'd0 : 10'($urandom); b = 10'($urandom);
      ey  =  0.299*r + 0.587*g + 0.114*b;
      ecr =  0.5*r - 0.4187*g - 0.0813*b + 512;
      ecb = -0.1687*r - 0.3313*g + 0.5*b + 512;
      repeat (3) @(posedge clk);
      #1;
      chk(int'(y) - clip(ey) <= 3 && clip(ey) - int'(y) <= 3, $sformatf("y %0d exp %0d", y, clip(ey)));
      chk(int'(cr) - clip(ecr) <= 3 && clip(ecr) - int'(cr) <= 3, $sformatf("cr %0d exp %0d", cr, clip(ecr)));
      chk(int'(cb) - clip(ecb) <= 3 && clip(ecb) - int'(cb) <= 3, $sformatf("cb %0d exp %0d", cb, clip(ecb)));
    end
    // latency: a step appears exactly on the third edge
    @(negedge clk); r = 0; g = 0; b = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); r = 1023; g = 1023; b = 1023;
    @(posedge clk); @(posedge clk); #1;
    chk(y < 10, "no output after 2 cycles");
    @(posedge clk); #1;
    chk(y > 1000, "output after 3 cycles");
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
