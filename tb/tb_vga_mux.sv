// Testbench for vga_mux: every 8-bit pixel value on a transmitter-style
// (tags shown) and a receiver-style (tags grey) instance, against a table
// written from the pixel encoding; blank forces black; syncs pass through.
module tb_vga_mux;
  logic clk = 0, hs = 0, vs = 0, bl = 0;
  logic [7:0] pixel = 0;
  logic [11:0] rgb1, rgb2;
  logic hs1, vs1, hs2, vs2;
  int checks = 0, failures = 0;
  vga_mux #(.SHOW_TAGS(1'b1)) dut1 (.clk, .pixel, .hsync_in(hs), .vsync_in(vs), .blank_in(bl), .rgb(rgb1), .hsync(hs1), .vsync(vs1));
  vga_mux #(.SHOW_TAGS(1'b0)) dut2 (.clk, .pixel, .hsync_in(hs), .vsync_in(vs), .blank_in(bl), .rgb(rgb2), .hsync(hs2), .vsync(vs2));
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 1024; i++) begin
      logic [11:0] grey, e1, e2; logic [3:0] g;
      @(negedge clk); pixel = 8'(i); bl = (i >= 512) && i[0]; hs = i[1]; vs = i[2];
      g = pixel[5:2]; grey = {g, g, g};
      case (pixel[7:4])
        4'b1100: begin e1 = 12'hFF0; e2 = 12'hFF0; end
        4'b1101: begin e1 = 12'hF6B; e2 = 12'hF6B; end
        4'b1110: begin e1 = 12'h0F0; e2 = 12'h0F0; end
        4'b1111: begin e1 = 12'hF00; e2 = 12'hF00; end
        4'b1000, 4'b1001, 4'b1010, 4'b1011: begin e1 = 12'hF6B; e2 = grey; end
        4'b0100, 4'b0101, 4'b0110, 4'b0111: begin e1 = 12'h0F0; e2 = grey; end
        default: begin e1 = grey; e2 = grey; end
      endcase
      if (bl) begin e1 = 0; e2 = 0; end
      @(posedge clk); #1;
      checks += 2;
      if (rgb1 != e1) begin failures++; $display("FAIL tx pixel %h rgb %h exp %h", pixel, rgb1, e1); end
      if (rgb2 != e2) begin failures++; $display("FAIL rx pixel %h rgb %h exp %h", pixel, rgb2, e2); end
      checks++;
      if (hs1 != hs || vs2 != vs) begin failures++; $display("FAIL syncs"); end
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
