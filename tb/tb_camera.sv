// Testbench for camera: drives an OV7670-style bus (pclk = clk/4, byte on
// each rising pclk while href is high) and checks that byte pairs come out
// as RGB565 pixels, one every 8 clocks, and that vsync gives frame_done.
module tb_camera;
  logic clk = 0, rst = 1, pclk = 0, vsync = 0, href = 0;
  logic [7:0] data = 0;
  logic xclk, valid_pixel, frame_done;
  logic [15:0] cam_pixel;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int last_valid = -1, cyc = 0, frames = 0;

  camera dut (.clk, .rst, .cam_pclk(pclk), .vsync, .href, .pixel(data), .xclk,
              .cam_pixel, .valid_pixel, .frame_done);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // one pclk period = 4 clk; data changes on the falling edge
  task automatic send_byte(logic [7:0] b, logic h);
    @(posedge clk); pclk <= 0; data <= b; href <= h;
    @(posedge clk);
    @(posedge clk); pclk <= 1;
    @(posedge clk);
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid_pixel) begin
      logic [15:0] e;
      e = sent.pop_front();
      chk(cam_pixel == e, $sformatf("pixel %h exp %h", cam_pixel, e));
      if (last_valid >= 0) chk(cyc - last_valid == 8, $sformatf("spacing %0d", cyc - last_valid));
      last_valid = cyc;
    end
    if (frame_done) frames++;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) send_byte(8'h00, 0);
    for (int i = 0; i < 20; i++) begin
      logic [15:0] p;
      p = 16'($urandom);
      sent.push_back(p);
      send_byte(p[15:8], 1);
      send_byte(p[7:0], 1);
    end
    send_byte(8'h00, 0);
    last_valid = -1;
    repeat (8) send_byte(8'h00, 0);
    chk(sent.size() == 0, "all pixels out");
    vsync <= 1; repeat (10) @(posedge clk); vsync <= 0;
    repeat (10) @(posedge clk);
    chk(frames == 1, $sformatf("frame_done count %0d", frames));
    // xclk is clk/4
    begin
      int t = 0; logic p0; p0 = xclk;
      repeat (2) @(posedge clk);
      chk(xclk != p0, "xclk toggles every 2 clocks");
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
