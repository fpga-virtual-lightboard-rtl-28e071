// End-to-end testbench of the whole lightboard at the default 320x240 frame.
// A behavioural OV7670 streams frames of a grey gradient with a 3x3 pink
// "fingertip"; the receiver listens on the transmitter's RMII output.
//   frame 0  tip at A, write mode, red ink     -> centre of mass found at A
//   frame 1  tip at A                          -> ink painted round A
//   frame 2  tip at B (centre still A)         -> ink at A kept, crosshair
//   frame 3  tip at B                          -> ink painted round B
//   frame 4  tip at A, erase mode              -> ink at A wiped, B kept
// Then the camera stops and the link runs until the whole frame has been
// sent again. Checked: ink, tags and erase in the transmitter frame buffer,
// both transmitter buffers identical, the receiver buffer identical to them,
// every packet passes its FCS and lands at its address, the audio sample
// arrives, and both monitors show the red ink while only the transmitter
// shows the pink threshold tag. Each mechanism is counted and must occur.
module tb_lightboard_top;
  localparam int W = 320, H = 240;
  localparam int AX = 150, AY = 100, BX = 40, BY = 200;
  logic clk65 = 0, clk50 = 0, rst = 1;
  logic pclk = 0, vsync = 0, href = 0;
  logic [7:0] cam_data = 0, mic = 8'hA7;
  logic [2:0] sw = 3'b110;
  logic cam_xclk, vga1_hs, vga1_vs, vga2_hs, vga2_vs, aud_pwm, fcs_done, fcs_ok, eth_txen;
  logic [11:0] vga1_rgb, vga2_rgb;
  logic [1:0] eth_txd;
  int checks = 0, failures = 0;

  lightboard_top dut (.clk_65mhz(clk65), .clk_50mhz(clk50), .rst, .cam_pclk(pclk), .cam_vsync(vsync),
    .cam_href(href), .cam_data, .cam_xclk, .sw, .thresh_lower(4'hA), .thresh_upper(4'hF),
    .mic_sample(mic), .vga1_rgb, .vga1_hs, .vga1_vs, .vga2_rgb, .vga2_hs, .vga2_vs, .aud_pwm,
    .fcs_done, .fcs_ok, .eth_txen, .eth_txd);

  always #7.692 clk65 = ~clk65;
  always #10 clk50 = ~clk50;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_com = 0, n_ink = 0, n_kept = 0, n_wipe = 0, n_cross = 0, n_thr = 0, n_grey = 0;
  int n_stall = 0, n_pkt_ok = 0, n_pkt_bad = 0, n_fw = 0, n_audio = 0, n_vga1 = 0, n_vga2 = 0;
  int red1 = 0, red2 = 0, pink1 = 0, pink2 = 0;
  logic fw_q = 0, vs1_q = 1, vs2_q = 1;
  always @(posedge clk65) if (!rst) begin
    if (dut.u_tx.u_com.valid_out) n_com++;
    if (dut.u_tx.u_compare.st == 3'd3) begin
      if (!dut.u_tx.u_compare.wr) n_kept++;
      else if (dut.u_tx.u_compare.erase && dut.u_tx.u_compare.mask_l &&
               dut.u_tx.u_compare.current_pixel[7:6] == 2'b11) n_wipe++;
      else case (dut.u_tx.u_compare.newpix[7:6])
        2'b11: n_ink++;
        2'b01: n_cross++;
        2'b10: n_thr++;
        default: n_grey++;
      endcase
    end
    if (vga1_rgb == 12'hF00) red1++;
    if (vga2_rgb == 12'hF00) red2++;
    if (vga1_rgb == 12'hF6B) pink1++;
    if (vga2_rgb == 12'hF6B) pink2++;
    if (vs1_q && !vga1_vs) n_vga1++;
    if (vs2_q && !vga2_vs) n_vga2++;
    vs1_q <= vga1_vs; vs2_q <= vga2_vs;
  end
  always @(posedge clk50) if (!rst) begin
    if (dut.u_tx.stall) n_stall++;
    if (fcs_done) begin if (fcs_ok) n_pkt_ok++; else n_pkt_bad++; end
    if (dut.u_rx.fv && !fw_q) n_fw++;
    fw_q <= dut.u_rx.fv;
    if (dut.u_rx.audio_valid) begin
      n_audio++;
      checks++; if (dut.u_rx.audio != mic) begin failures++; $display("FAIL audio %h", dut.u_rx.audio); end
    end
  end

  // ---------------- camera model ----------------
  always @(posedge clk65) ;  // pclk made by the tasks below, 4 clk65 per period
  task automatic cam_byte(logic [7:0] b, logic h);
    @(posedge clk65); pclk <= 0; cam_data <= b; href <= h;
    @(posedge clk65);
    @(posedge clk65); pclk <= 1;
    @(posedge clk65);
  endtask
  function automatic logic [15:0] scene(int x, int y, int tx, int ty);
    logic [5:0] g;
    if (x >= tx - 1 && x <= tx + 1 && y >= ty - 1 && y <= ty + 1) return {5'd31, 6'd10, 5'd20};
    g = 6'((x + y) % 64);
    return {g[5:1], g, g[5:1]};
  endfunction
  task automatic cam_frame(int tx, int ty);
    vsync <= 1; repeat (8) cam_byte(8'h00, 0); vsync <= 0;
    repeat (8) cam_byte(8'h00, 0);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        logic [15:0] p;
        p = scene(x, y, tx, ty);
        cam_byte(p[15:8], 1);
        cam_byte(p[7:0], 1);
      end
      repeat (4) cam_byte(8'h00, 0);
    end
  endtask

  function automatic logic [7:0] txm(int x, int y);
    return dut.u_tx.frame_buffer_vga.mem[y * W + x];
  endfunction

  initial begin
    int diff_tx, diff_rx;
    repeat (10) @(posedge clk50); rst <= 0;
    cam_frame(AX, AY);                    // frame 0
    cam_frame(AX, AY);                    // frame 1 (centre from frame 0)
    cam_frame(BX, BY);                    // frame 2
    // ink round A after frame 1 (frame 2 only keeps it)
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
      chk(txm(AX + dx, AY + dy) == 8'hF0, $sformatf("red ink at A (%0d,%0d): %h", dx, dy, txm(AX + dx, AY + dy)));
    chk(txm(AX + 3, AY)[7:6] == 2'b01 && txm(AX, AY + 5)[7:6] == 2'b01, "crosshair on the centre row and column");
    cam_frame(BX, BY);                    // frame 3 (centre B from frame 2)
    sw <= 3'b111;                         // erase mode
    cam_frame(AX, AY);                    // frame 4 (centre B from frame 3)
    vsync <= 1; repeat (8) cam_byte(8'h00, 0); vsync <= 0;   // close frame 4
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
      chk(txm(AX + dx, AY + dy)[7:6] == 2'b10, $sformatf("A wiped to threshold tag: %h", txm(AX + dx, AY + dy)));
      chk(txm(BX + dx, BY + dy) == 8'hF0, "ink at B kept through erase elsewhere");
    end
    chk(txm(5, 7) == {2'b00, txm(5, 7)[5:0]} && txm(5, 7)[5:0] != 6'd0, "plain grey background");
    // let the link send the whole frame once more, then a VGA frame
    repeat (240 * 1448 + 2 * 1448) @(posedge clk50);
    repeat (1344 * 806 + 100) @(posedge clk65);
    diff_tx = 0; diff_rx = 0;
    for (int a = 0; a < W * H; a++) begin
      if (dut.u_tx.frame_buffer_vga.mem[a] != dut.u_tx.frame_buffer_ethernet.mem[a]) diff_tx++;
      if (dut.u_tx.frame_buffer_vga.mem[a] != dut.u_rx.u_bram.mem[a]) diff_rx++;
    end
    chk(diff_tx == 0, $sformatf("transmitter buffers differ in %0d pixels", diff_tx));
    chk(diff_rx == 0, $sformatf("receiver buffer differs in %0d pixels", diff_rx));
    chk(n_pkt_bad == 0, $sformatf("%0d packets failed the FCS", n_pkt_bad));
    chk(red1 > 0 && red2 > 0, $sformatf("ink on both monitors (%0d, %0d)", red1, red2));
    chk(pink1 > 0 && pink2 == 0, $sformatf("threshold tag pink only on the transmitter (%0d, %0d)", pink1, pink2));
    // every mechanism must have happened
    chk(n_com >= 3,    $sformatf("centre of mass results %0d", n_com));
    chk(n_ink > 0,     $sformatf("ink writes %0d", n_ink));
    chk(n_kept > 0,    $sformatf("ink kept %0d", n_kept));
    chk(n_wipe > 0,    $sformatf("erase wipes %0d", n_wipe));
    chk(n_cross > 0,   $sformatf("crosshair writes %0d", n_cross));
    chk(n_thr > 0,     $sformatf("threshold writes %0d", n_thr));
    chk(n_stall > 0,   $sformatf("stall cycles %0d", n_stall));
    chk(n_pkt_ok >= 240, $sformatf("packets with good FCS %0d", n_pkt_ok));
    chk(n_fw >= 240,   $sformatf("frames through the firewall %0d", n_fw));
    chk(n_audio >= 240, $sformatf("audio samples %0d", n_audio));
    chk(n_vga1 >= 1 && n_vga2 >= 1, "monitor frames");
    $display("mechanisms: com=%0d ink=%0d kept=%0d wipe=%0d cross=%0d thr=%0d grey=%0d stall=%0d pkt_ok=%0d fw=%0d audio=%0d vga=%0d/%0d",
             n_com, n_ink, n_kept, n_wipe, n_cross, n_thr, n_grey, n_stall, n_pkt_ok, n_fw, n_audio, n_vga1, n_vga2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (9000000) @(posedge clk65);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
