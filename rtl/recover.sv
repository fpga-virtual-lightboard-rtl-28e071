// Attaches a position to each camera pixel. Every valid_pixel advances hcount
// from 0 to FRAME_W-1, then wraps and advances vcount; frame_done restarts
// both at (0,0). The outputs are registered: data_valid, pixel, hcount and
// vcount appear one cycle after valid_pixel and hold until the next pixel.
// Counting valid pixels (rather than using href) is this design's choice.
module recover #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_pixel,
  input  logic [15:0] cam_pixel,
  input  logic        frame_done,
  output logic [15:0] pixel,
  output logic        data_valid,
  output logic [8:0]  hcount,
  output logic [7:0]  vcount
);
  logic [8:0] hnext;
  logic [7:0] vnext;

  always_ff @(posedge clk) begin
    if (rst || frame_done) begin
      hnext      <= '0;
      vnext      <= '0;
      data_valid <= 1'b0;
      if (rst) begin
        pixel  <= '0;
        hcount <= '0;
        vcount <= '0;
      end
    end else begin
      data_valid <= valid_pixel;
      if (valid_pixel) begin
        pixel  <= cam_pixel;
        hcount <= hnext;
        vcount <= vnext;
        if (hnext == 9'(FRAME_W - 1)) begin
          hnext <= '0;
          vnext <= (vnext == 8'(FRAME_H - 1)) ? '0 : vnext + 8'd1;
        end else begin
          hnext <= hnext + 9'd1;
        end
      end
    end
  end
endmodule
