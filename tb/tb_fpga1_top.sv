// Testbench for the transmitter board at a reduced 32x24 frame. A camera
// model streams frames with a pink fingertip; afterwards the RMII output
// is decoded packet by packet. Each packet must be 74 bytes + 12 idle
// (296 clocks), carry the broadcast address, a correct FCS, the address
// line*32 and exactly that line of the transmitter's frame buffer, and the
// microphone byte. The frame buffer must hold ink round the fingertip.
module tb_fpga1_top;
  localparam int W = 32, H = 24, TX = 20, TY = 10;
  localparam int FO = 8 + 14 + 3 + W + 1;   // FCS offset in a captured packet
  logic clk65 = 0, clk50 = 0, rst = 1, pclk = 0, vsync = 0, href = 0;
  logic [7:0] cam_data = 0, vol = 8'h3C;
  logic cam_xclk, vga_hs, vga_vs, phy_txen;
  logic [11:0] vga_rgb;
  logic [1:0] phy_txd;
  int checks = 0, failures = 0;

  fpga1_top #(.FRAME_W(W), .FRAME_H(H)) dut (.clk_65mhz(clk65), .eth_refclk(clk50), .rst, .cam_pclk(pclk),
    .cam_vsync(vsync), .cam_href(href), .cam_data, .cam_xclk, .sw(3'b100), .thresh_lower(4'hA),
    .thresh_upper(4'hF), .vol_data(vol), .vga_rgb, .vga_hs, .vga_vs, .phy_txen, .phy_txd);
  always #7.692 clk65 = ~clk65;
  always #10 clk50 = ~clk50;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] ref_crc(byte unsigned m [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (m[i]) begin
      c ^= 32'(m[i]);
      repeat (8) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : (c >> 1);
    end
    return ~c;
  endfunction

  task automatic cam_byte(logic [7:0] b, logic h);
    @(posedge clk65); pclk <= 0; cam_data <= b; href <= h;
    @(posedge clk65);
    @(posedge clk65); pclk <= 1;
    @(posedge clk65);
  endtask
  task automatic cam_frame();
    vsync <= 1; repeat (8) cam_byte(8'h00, 0); vsync <= 0;
    repeat (8) cam_byte(8'h00, 0);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        logic [15:0] p;
        p = (x >= TX - 1 && x <= TX + 1 && y >= TY - 1 && y <= TY + 1) ? {5'd31, 6'd10, 5'd20} : {5'd8, 6'd16, 5'd8};
        cam_byte(p[15:8], 1); cam_byte(p[7:0], 1);
      end
      repeat (4) cam_byte(8'h00, 0);
    end
  endtask

  // packet capture
  byte unsigned pkt [$];
  byte unsigned pkts [$][$];
  int starts [$];
  logic [7:0] b; int nd = 0, cyc = 0; logic en_q = 0;
  always @(posedge clk50) if (!rst) begin
    cyc++;
    if (phy_txen) begin
      if (!en_q) begin starts.push_back(cyc); pkt.delete(); nd = 0; end
      b = {phy_txd, b[7:2]}; nd++;
      if (nd == 4) begin pkt.push_back(b); nd = 0; end
    end else if (en_q) pkts.push_back(pkt);
    en_q = phy_txen;
  end

  initial begin
    int first;
    repeat (10) @(posedge clk50); rst <= 0;
    repeat (3) cam_frame();
    vsync <= 1; repeat (8) cam_byte(8'h00, 0); vsync <= 0;
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
      chk(dut.frame_buffer_vga.mem[(TY + dy) * W + TX + dx] == 8'hE0, "green ink round the fingertip");
    first = pkts.size();
    repeat (2 * H * 296 + 400) @(posedge clk50);
    chk(pkts.size() >= first + 2 * H, "packets sent");
    for (int k = first + 1; k < first + 1 + H; k++) begin
      byte unsigned body [$];
      int line, a;
      logic [31:0] f;
      body.delete();
      chk(pkts[k].size() == 8 + 14 + 3 + W + 1 + 4, $sformatf("packet size %0d", pkts[k].size()));
      chk(starts[k + 1] - starts[k] == 296, $sformatf("packet period %0d", starts[k + 1] - starts[k]));
      for (int i = 8; i < 8 + 14 + 3 + W + 1; i++) body.push_back(pkts[k][i]);
      f = ref_crc(body);
      chk({pkts[k][FO+3], pkts[k][FO+2], pkts[k][FO+1], pkts[k][FO]} == f, "FCS");
      chk(pkts[k][8] == 8'hFF && pkts[k][13] == 8'hFF, "broadcast");
      a = {pkts[k][22], pkts[k][23], pkts[k][24]};
      chk(a % W == 0 && a < W * H, $sformatf("address %0d", a));
      line = a / W;
      for (int x = 0; x < W; x++)
        if (pkts[k][25 + x] != dut.frame_buffer_ethernet.mem[line * W + x]) begin
          chk(0, $sformatf("line %0d pixel %0d", line, x)); break;
        end
      checks++;
      chk(pkts[k][25 + W] == vol, "audio byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk65);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
