// Testbench for recover: feeds pixels one every 8 clocks over more than one
// line, checks the position attached to each, then checks that frame_done
// restarts the count at (0,0).
module tb_recover;
  logic clk = 0, rst = 1, valid_pixel = 0, frame_done = 0;
  logic [15:0] cam_pixel = 0, pixel;
  logic data_valid;
  logic [8:0] hcount;
  logic [7:0] vcount;
  int checks = 0, failures = 0;

  recover dut (.clk, .rst, .valid_pixel, .cam_pixel, .frame_done, .pixel, .data_valid, .hcount, .vcount);
  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic feed(int n, int base);
    for (int i = 0; i < n; i++) begin
      logic [15:0] p;
      p = 16'($urandom);
      @(posedge clk); valid_pixel <= 1; cam_pixel <= p;
      @(posedge clk); valid_pixel <= 0;
      #1;
      chk(data_valid && pixel == p, "pixel/valid");
      chk(hcount == 9'((base + i) % 320) && vcount == 8'((base + i) / 320),
          $sformatf("pos %0d,%0d for %0d", hcount, vcount, base + i));
      repeat (6) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    feed(700, 0);
    @(posedge clk); frame_done <= 1; @(posedge clk); frame_done <= 0;
    feed(5, 0);
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
