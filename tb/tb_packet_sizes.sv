// Packet-size workload: the full 320x240 link run with 80, 160, 320, 640
// and 1280 pixels per packet (payload = pixels + 1 audio byte, plus 41
// bytes of framing, address and gap). For each size the transmitter's frame
// buffers are preloaded with a test pattern, the link runs until the whole
// frame has crossed, and the receiver's buffer must equal it with every
// FCS good. The measured packet period gives the frame rate, the audio
// sample rate and the share of user data, compared with:
//   pixels  user %  frames/s  audio kS/s
//     80    66.39    106.73     102.46
//    160    79.70    128.92      61.88
//    320    88.67    143.92      34.53
//    640    93.99    152.74      18.33
//   1280    96.90    157.59       9.46
// The frame rate is allowed 0.05 frames/s of slack: 50 MHz / 1448 clocks /
// 240 packets is 143.88, and the 143.92 in this table is rounded loosely.
module tb_packet_sizes;
  localparam int N = 5;
  localparam int PIX [N] = '{80, 160, 320, 640, 1280};
  localparam real FPS [N] = '{106.73, 128.92, 143.92, 152.74, 157.59};
  localparam real KSPS [N] = '{102.46, 61.88, 34.53, 18.33, 9.46};
  localparam real USER [N] = '{66.39, 79.70, 88.67, 93.99, 96.90};
  logic clk65 = 0, clk50 = 0, rst = 1;
  int checks = 0, failures = 0;
  bit done [N];
  always #7.692 clk65 = ~clk65;
  always #10 clk50 = ~clk50;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [7:0] pattern(int a, int k);
    return 8'(a * 7 + a / 320 + k * 13);
  endfunction

  for (genvar k = 0; k < N; k++) begin : g
    logic txen, fdone, fok, xclk, hs1, vs1, hs2, vs2, pwm;
    logic [1:0] txd;
    logic [11:0] rgb1, rgb2;
    lightboard_top #(.PIXELS_PER_PACKET(PIX[k])) dut (.clk_65mhz(clk65), .clk_50mhz(clk50), .rst,
      .cam_pclk(1'b0), .cam_vsync(1'b0), .cam_href(1'b0), .cam_data(8'h00), .cam_xclk(xclk), .sw(3'b000),
      .thresh_lower(4'hA), .thresh_upper(4'hF), .mic_sample(8'(k + 1)), .vga1_rgb(rgb1), .vga1_hs(hs1),
      .vga1_vs(vs1), .vga2_rgb(rgb2), .vga2_hs(hs2), .vga2_vs(vs2), .aud_pwm(pwm), .fcs_done(fdone),
      .fcs_ok(fok), .eth_txen(txen), .eth_txd(txd));

    int cyc = 0, last_start = -1, period = 0, n_ok = 0, n_bad = 0, n_aud = 0;
    logic en_q = 0;
    always @(posedge clk50) if (!rst) begin
      cyc++;
      if (txen && !en_q) begin
        if (last_start >= 0) period = cyc - last_start;
        last_start = cyc;
      end
      en_q = txen;
      if (fdone) begin if (fok) n_ok++; else n_bad++; end
      if (dut.u_rx.audio_valid) begin
        n_aud++;
        if (dut.u_rx.audio != 8'(k + 1)) begin failures++; $display("FAIL audio byte, %0d pixels", PIX[k]); end
      end
    end

    initial begin
      int npk, diff;
      real fps, ksps, user;
      // loaded once reset has settled every register, so no write left over
      // from the power-up state can land on the pattern; the first packet
      // may leave before the load, which is why one extra packet is awaited
      wait (!rst);
      for (int a = 0; a < 76800; a++) begin
        dut.u_tx.frame_buffer_vga.mem[a] = pattern(a, k);
        dut.u_tx.frame_buffer_ethernet.mem[a] = pattern(a, k);
      end
      npk = 76800 / PIX[k];
      wait (n_ok >= npk + 1);
      repeat (10) @(posedge clk50);
      diff = 0;
      for (int a = 0; a < 76800; a++)
        if (dut.u_rx.u_bram.mem[a] != pattern(a, k)) begin
          if (diff < 4) $display("  %0d pixels/packet: address %0d holds %h, expected %h", PIX[k], a,
                                 dut.u_rx.u_bram.mem[a], pattern(a, k));
          diff++;
        end
      chk(diff == 0, $sformatf("%0d pixels/packet: %0d pixels differ at the receiver", PIX[k], diff));
      chk(n_bad == 0, $sformatf("%0d pixels/packet: %0d bad FCS", PIX[k], n_bad));
      chk(period == (PIX[k] + 1 + 41) * 4, $sformatf("%0d pixels/packet: period %0d clocks", PIX[k], period));
      fps  = 50.0e6 / period / npk;
      ksps = 50.0e6 / period / 1000.0;
      user = 100.0 * (PIX[k] + 1) / (PIX[k] + 1 + 41);
      chk(fps - FPS[k] < 0.05 && FPS[k] - fps < 0.05, $sformatf("%0d pixels/packet: %0.2f frames/s", PIX[k], fps));
      chk(ksps - KSPS[k] < 0.01 && KSPS[k] - ksps < 0.01, $sformatf("%0d pixels/packet: %0.2f kS/s", PIX[k], ksps));
      chk(user - USER[k] < 0.01 && USER[k] - user < 0.01, $sformatf("%0d pixels/packet: %0.2f %% user data", PIX[k], user));
      chk(n_aud >= npk, "audio samples");
      $display("%0d pixels/packet: %0d clocks/packet, %0.2f frames/s, %0.2f kS/s audio, %0.2f %% user data",
               PIX[k], period, fps, ksps, user);
      done[k] = 1;
    end
  end

  initial begin
    repeat (10) @(posedge clk50);
    rst <= 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1500000) @(posedge clk50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
