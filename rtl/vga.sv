// Video timing for a 1024x768, 60 Hz monitor on the 65 MHz pixel clock.
// hcount runs 0..1343 and vcount 0..805; the visible area is hcount < 1024
// and vcount < 768, elsewhere blank is high. hsync is low for hcount
// 1048..1183, vsync low for vcount 771..776 (VESA timing: front porch 24/3,
// sync 136/6, back porch 160/29). All outputs are registered together.
// The resolution and rate follow the design; the porch and sync numbers are
// the standard VESA ones.
module vga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] hn;
  logic [9:0]  vn;

  always_comb begin
    hn = (hcount == 11'(H_TOTAL - 1)) ? '0 : hcount + 11'd1;
    vn = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      vn = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= hn;
      vcount <= vn;
      hsync  <= !((hn >= 11'(H_ACTIVE + H_FP)) && (hn < 11'(H_ACTIVE + H_FP + H_SYNC)));
      vsync  <= !((vn >= 10'(V_ACTIVE + V_FP)) && (vn < 10'(V_ACTIVE + V_FP + V_SYNC)));
      blank  <= (hn >= 11'(H_ACTIVE)) || (vn >= 10'(V_ACTIVE));
    end
  end
endmodule
