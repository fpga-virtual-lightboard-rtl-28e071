// Testbench for compare, with a behavioural two-cycle-latency frame buffer.
// Checks: read address and write timing of the 8-state cycle, 3x3 ink brush
// round the centre of mass in the selected colour, ink kept against later
// grey pixels, crosshair and threshold tags, and erase mode wiping ink where
// the glove is.
module tb_compare;
  import lb_pkg::*;
  logic clk = 0, rst = 1, valid = 0, mask = 0, data_valid = 0;
  logic [8:0] x_com = 0, hcount_rec = 0;
  logic [7:0] y_com = 0, vcount_rec = 0, current_pixel, pixel;
  logic [2:0] sw = 0;
  logic [5:0] y = 0;
  logic pixel_valid;
  logic [16:0] pixel_addr;
  logic [7:0] mem [76800];
  logic [7:0] r1, r2;
  int checks = 0, failures = 0, writes = 0;

  compare dut (.clk, .rst, .valid, .x_com, .y_com, .sw, .y, .mask, .data_valid, .hcount_rec,
               .vcount_rec, .current_pixel, .pixel_valid, .pixel_addr, .pixel);
  always #5 clk = ~clk;
  // behavioural frame buffer port A, read-first, two-cycle read
  always_ff @(posedge clk) begin
    r1 <= mem[pixel_addr];
    r2 <= r1;
    if (pixel_valid) begin mem[pixel_addr] <= pixel; writes++; end
  end
  assign current_pixel = r2;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // send one camera pixel, check where and when the write lands
  task automatic px(int h, int v, logic [5:0] yy, logic m, logic [7:0] expv, bit expw);
    int a, w0, t;
    a = v * 320 + h;
    w0 = writes;
    @(negedge clk); hcount_rec = 9'(h); vcount_rec = 8'(v); y = yy; mask = m; data_valid = 1;
    @(negedge clk); data_valid = 0;
    chk(pixel_addr == 17'(a), $sformatf("read address %0d exp %0d", pixel_addr, a));
    t = 0;
    for (int i = 0; i < 7; i++) begin
      @(posedge clk); #1; t++;
      if (pixel_valid) begin
        chk(t == 3, $sformatf("write %0d cycles after address", t));
        chk(pixel_addr == 17'(a), "write address");
      end
    end
    if (expw) chk(writes == w0 + 1 && mem[a] == expv, $sformatf("(%0d,%0d) wrote %h exp %h", h, v, mem[a], expv));
    else      chk(writes == w0, $sformatf("(%0d,%0d) must not be written", h, v));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    repeat (3) @(posedge clk); rst <= 0;
    // before any centre: plain grey and threshold tags only
    px(10, 10, 6'd33, 0, 8'h21, 1);
    px(11, 10, 6'd5, 1, 8'h85, 1);
    // centre at (100,50), write mode, red ink
    @(negedge clk); x_com = 100; y_com = 50; valid = 1; @(negedge clk); valid = 0;
    sw = 3'b110;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        px(100 + dx, 50 + dy, 6'd7, 0, 8'hF0, 1);
    px(102, 52, 6'd9, 0, 8'h09, 1);                 // just outside: grey
    px(102, 50, 6'd9, 0, 8'h49, 1);                 // right of the brush: crosshair
    px(98, 50, 6'd9, 0, 8'h49, 1);                  // left of the brush: crosshair
    px(100, 48, 6'd9, 0, 8'h49, 1);                 // above the brush: crosshair
    px(100, 60, 6'd9, 0, 8'h49, 1);                 // centre column: crosshair
    px(30, 50, 6'd9, 1, 8'h49, 1);                  // centre row beats threshold
    px(30, 51, 6'd9, 1, 8'h89, 1);                  // threshold
    // centre moves away: the ink stays
    @(negedge clk); x_com = 200; y_com = 200; valid = 1; @(negedge clk); valid = 0;
    px(100, 50, 6'd2, 0, 8'hF0, 0);
    px(99, 49, 6'd2, 1, 8'hF0, 0);
    // yellow ink at the new centre
    sw = 3'b000;
    px(201, 199, 6'd2, 0, 8'hC0, 1);
    sw = 3'b010;
    px(199, 201, 6'd2, 0, 8'hD0, 1);
    sw = 3'b100;
    px(200, 201, 6'd2, 0, 8'hE0, 1);
    // erase mode: the glove (mask) wipes ink, ink elsewhere survives, no new ink
    sw = 3'b001;
    px(100, 50, 6'd12, 1, 8'h8C, 1);
    px(101, 51, 6'd12, 0, 8'hF0, 0);
    px(201, 200, 6'd12, 0, 8'h4C, 1);
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
