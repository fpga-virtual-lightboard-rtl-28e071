// Centre of mass of the masked pixels of one frame. While valid_in is high
// the pixel's x and y are added to two sums and a pixel count. tabulate_in
// (frame end) hands the sums to two dividers, x = sum_x / count and
// y = sum_y / count, and clears the sums for the next frame. valid_out
// pulses for one cycle when both quotients are ready, WIDTH+2 cycles after
// tabulate_in; x_out/y_out hold until the next result. A frame without any
// masked pixel gives no result. The sums and division follow the design;
// the serial divider and the empty-frame rule are this design's choices.
module center_of_mass (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] x_in,
  input  logic [7:0] y_in,
  input  logic       valid_in,
  input  logic       tabulate_in,
  output logic [8:0] x_out,
  output logic [7:0] y_out,
  output logic       valid_out
);
  localparam int unsigned W = 25;   // 320*240*319 < 2^25
  logic [W-1:0] sum_x, sum_y, cnt;
  logic [W-1:0] nx, ny, nc;
  logic [W-1:0] qx, qy, rx, ry;
  logic         bx, by, dx, dy, start;

  always_comb begin
    nx = sum_x + (valid_in ? W'(x_in) : '0);
    ny = sum_y + (valid_in ? W'(y_in) : '0);
    nc = cnt   + (valid_in ? W'(1)    : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_x <= '0;
      sum_y <= '0;
      cnt   <= '0;
    end else if (tabulate_in) begin
      sum_x <= '0;
      sum_y <= '0;
      cnt   <= '0;
    end else begin
      sum_x <= nx;
      sum_y <= ny;
      cnt   <= nc;
    end
  end

  assign start = tabulate_in && (nc != '0) && !bx && !by;

  divider #(.WIDTH(W)) u_div_x (.clk, .rst, .start, .dividend(nx), .divisor(nc),
                                .quotient(qx), .remainder(rx), .busy(bx), .done(dx));
  divider #(.WIDTH(W)) u_div_y (.clk, .rst, .start, .dividend(ny), .divisor(nc),
                                .quotient(qy), .remainder(ry), .busy(by), .done(dy));

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out     <= '0;
      y_out     <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= dx & dy;
      if (dx & dy) begin
        x_out <= qx[8:0];
        y_out <= qy[7:0];
      end
    end
  end
endmodule
