// Write-address generator of the receiver. The address field of each packet
// (valid_addr) sets the base; every following pixel (valid_pixel) is written
// to base + n, n = 0, 1, ..., so a lost packet only loses its own line and
// the next packet lands in the right place. Addresses wrap at DEPTH. The
// write (valid_pixel_in, pixel_in_addr, pixel_out) comes one cycle after the
// pixel. Resynchronising on the transmitted address follows the design.
module frame_packaging #(
  parameter int unsigned DEPTH = 76800
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] addr,
  input  logic        valid_addr,
  input  logic [7:0]  pixel,
  input  logic        valid_pixel,
  output logic [16:0] pixel_in_addr,
  output logic        valid_pixel_in,
  output logic [7:0]  pixel_out
);
  logic [16:0] next_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      next_addr      <= '0;
      pixel_in_addr  <= '0;
      valid_pixel_in <= 1'b0;
      pixel_out      <= '0;
    end else begin
      valid_pixel_in <= 1'b0;
      if (valid_addr) begin
        next_addr <= (addr < 24'(DEPTH)) ? addr[16:0] : '0;
      end else if (valid_pixel) begin
        pixel_in_addr  <= next_addr;
        pixel_out      <= pixel;
        valid_pixel_in <= 1'b1;
        next_addr      <= (next_addr == 17'(DEPTH - 1)) ? '0 : next_addr + 17'd1;
      end
    end
  end
endmodule
