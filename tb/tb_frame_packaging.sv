// Testbench for frame_packaging: after each address, pixels must be written
// to consecutive addresses from it, one cycle after they arrive, wrapping at
// the end of the frame; a new address resynchronises the count.
module tb_frame_packaging;
  logic clk = 0, rst = 1, valid_addr = 0, valid_pixel = 0, valid_pixel_in;
  logic [23:0] addr = 0;
  logic [7:0] pixel = 0, pixel_out;
  logic [16:0] pixel_in_addr;
  int checks = 0, failures = 0;
  frame_packaging dut (.clk, .rst, .addr, .valid_addr, .pixel, .valid_pixel, .pixel_in_addr, .valid_pixel_in, .pixel_out);
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 6; t++) begin
      int a, n;
      a = (t == 2) ? 76790 : int'($urandom_range(76799));
      n = int'($urandom_range(40, 1));
      @(negedge clk); addr = 24'(a); valid_addr = 1; @(negedge clk); valid_addr = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk); pixel = 8'($urandom); valid_pixel = 1;
        @(posedge clk); #1;
        checks++;
        if (!valid_pixel_in || pixel_in_addr != 17'((a + i) % 76800) || pixel_out != pixel) begin
          failures++; $display("FAIL t=%0d i=%0d addr %0d exp %0d", t, i, pixel_in_addr, (a + i) % 76800);
        end
        @(negedge clk); valid_pixel = 0;
        @(posedge clk); #1;
        checks++; if (valid_pixel_in) begin failures++; $display("FAIL spurious write"); end
      end
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
