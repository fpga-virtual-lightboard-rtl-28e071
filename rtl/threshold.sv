// Colour threshold. A pixel is tagged as mask when the upper four bits of its
// Cr value lie within [lower, upper] (inclusive). The bright pink fingertip
// and palm of the glove give a high Cr. One-cycle registered output. Using
// Cr[9:6] follows the design; the inclusive range and the limits as inputs
// are this design's choices.
module threshold (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] cr,
  input  logic [3:0] lower,
  input  logic [3:0] upper,
  output logic       mask
);
  logic [3:0] cr4;
  assign cr4 = cr[9:6];

  always_ff @(posedge clk) begin
    if (rst) mask <= 1'b0;
    else     mask <= (cr4 >= lower) && (cr4 <= upper);
  end
endmodule
