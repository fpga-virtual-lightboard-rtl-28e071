// RGB to YCrCb colour conversion, 10-bit in, 10-bit out, three-cycle latency
// (multiply, sum, offset and clamp). ITU-R BT.601 full-range coefficients in
// 8-bit fixed point (this design's choice):
//   Y  =  0.299R + 0.587G + 0.114B         ( 77, 150,  29)/256
//   Cr =  0.500R - 0.419G - 0.081B + 512   (128,-107, -21)/256
//   Cb = -0.169R - 0.331G + 0.500B + 512   (-43, -85, 128)/256
// Y feeds the stored grey pixel; Cr feeds the colour threshold.
module rgb_to_ycrcb (
  input  logic       clk,
  input  logic [9:0] r,
  input  logic [9:0] g,
  input  logic [9:0] b,
  output logic [9:0] y,
  output logic [9:0] cr,
  output logic [9:0] cb
);
  logic signed [19:0] yr, yg, yb, rr, rg, rb, br, bg, bb;
  logic signed [20:0] ys, rs, bs;

  function automatic logic [9:0] clamp10(logic signed [20:0] v);
    logic signed [20:0] s;
    s = v >>> 8;
    if (s < 0)           return 10'd0;
    else if (s > 21'sd1023) return 10'd1023;
    else                 return s[9:0];
  endfunction

  always_ff @(posedge clk) begin
    yr <= 20'sd77  * $signed({1'b0, r});
    yg <= 20'sd150 * $signed({1'b0, g});
    yb <= 20'sd29  * $signed({1'b0, b});
    rr <= 20'sd128 * $signed({1'b0, r});
    rg <= -20'sd107 * $signed({1'b0, g});
    rb <= -20'sd21 * $signed({1'b0, b});
    br <= -20'sd43 * $signed({1'b0, r});
    bg <= -20'sd85 * $signed({1'b0, g});
    bb <= 20'sd128 * $signed({1'b0, b});

    ys <= 21'(yr) + 21'(yg) + 21'(yb);
    rs <= 21'(rr) + 21'(rg) + 21'(rb) + 21'sd131072;   // +512 << 8
    bs <= 21'(br) + 21'(bg) + 21'(bb) + 21'sd131072;

    y  <= clamp10(ys);
    cr <= clamp10(rs);
    cb <= clamp10(bs);
  end
endmodule
