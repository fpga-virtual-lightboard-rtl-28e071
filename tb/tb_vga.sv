// Testbench for vga: runs a full frame and a half and measures line and
// frame length, sync pulse widths and positions, and the visible area.
module tb_vga;
  logic clk = 0, rst = 1, hsync, vsync, blank;
  logic [10:0] hcount;
  logic [9:0] vcount;
  int checks = 0, failures = 0;
  vga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);
  always #5 clk = ~clk;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int cyc = 0, hs_fall = -1, hs_len = 0, line_len = 0, vis = 0, vs_lines = 0, vs_fall_cnt = 0;
  int vs_fall_at = -1, frame_len = 0;
  logic hs_q = 1, vs_q = 1;
  always @(posedge clk) if (!rst) begin
    #1;
    cyc++;
    if (!blank) vis++;
    chk(blank == (hcount >= 1024 || vcount >= 768), "blank matches counts");
    if (!hsync) chk(hcount >= 1048 && hcount < 1184, "hsync position");
    if (!vsync) chk(vcount >= 771 && vcount < 777, "vsync position");
    if (hs_q && !hsync) begin
      if (hs_fall >= 0) line_len = cyc - hs_fall;
      hs_fall = cyc;
    end
    if (!hs_q && hsync) hs_len = cyc - hs_fall;
    if (vs_q && !vsync) begin
      if (vs_fall_at >= 0) frame_len = cyc - vs_fall_at;
      vs_fall_at = cyc; vs_fall_cnt++;
    end
    hs_q = hsync; vs_q = vsync;
  end

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    repeat (1344 * 806 * 2 + 2000) @(posedge clk);
    chk(line_len == 1344, $sformatf("line length %0d", line_len));
    chk(hs_len == 136, $sformatf("hsync width %0d", hs_len));
    chk(frame_len == 1344 * 806, $sformatf("frame length %0d", frame_len));
    chk(vs_fall_cnt == 2, "two vsyncs");
    chk(vis >= 2 * 1024 * 768 && vis < 2 * 1024 * 768 + 3000, $sformatf("visible %0d", vis));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
