// Testbench for the receiver board at a reduced 32x24 frame. Ethernet
// frames are built here (preamble, SFD, header, address, pixels, audio,
// FCS) and driven on the RMII inputs. Checks: good frames land at their
// address and report FCS ok (every pixel of the frame buffer is compared
// with a model); a frame for the board's own MAC address is accepted like a
// broadcast one; a frame for another MAC address changes nothing; a frame
// with a corrupted byte reports FCS bad; the audio byte reaches the PWM
// stage, whose duty cycle over one 256-clock period equals the sample.
module tb_fpga2_top;
  localparam int W = 32, H = 24;
  logic clk65 = 0, clk50 = 0, rst = 1, crs_dv = 0;
  logic [1:0] rxd = 0;
  logic [11:0] vga_rgb;
  logic vga_hs, vga_vs, aud_pwm, fcs_done, fcs_ok;
  logic [7:0] model [W * H];
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;

  fpga2_top #(.FRAME_W(W), .FRAME_H(H)) dut (.clk_65mhz(clk65), .eth_refclk(clk50), .rst, .crs_dv, .rxd,
    .vga_rgb, .vga_hs, .vga_vs, .aud_pwm, .fcs_done, .fcs_ok);
  always #7.692 clk65 = ~clk65;
  always #10 clk50 = ~clk50;
  always @(posedge clk50) if (!rst && fcs_done) begin if (fcs_ok) n_ok++; else n_bad++; end

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

  task automatic send(int line, logic [47:0] dst, bit corrupt, logic [7:0] au);
    byte unsigned m [$];
    logic [31:0] f;
    logic [23:0] a;
    bit keep;
    keep = (dst == 48'hFFFF_FFFF_FFFF) || (dst == 48'h02_00_00_00_00_02);
    a = 24'(line * W);
    for (int i = 5; i >= 0; i--) m.push_back(dst[8*i +: 8]);
    for (int i = 0; i < 6; i++) m.push_back(8'h10 + 8'(i));
    m.push_back(8'h00); m.push_back(8'(W + 4));
    m.push_back(a[23:16]); m.push_back(a[15:8]); m.push_back(a[7:0]);
    for (int x = 0; x < W; x++) begin
      logic [7:0] p; p = 8'($urandom);
      m.push_back(p);
      if (keep) model[line * W + x] = corrupt && x == 3 ? p ^ 8'h01 : p;
    end
    m.push_back(au);
    f = ref_crc(m);
    for (int k = 0; k < 4; k++) m.push_back(8'(f >> (8 * k)));
    if (corrupt) m[14 + 3 + 3] ^= 8'h01;
    @(negedge clk50); crs_dv = 1;
    for (int i = 0; i < 31; i++) begin rxd = 2'b01; @(negedge clk50); end
    rxd = 2'b11; @(negedge clk50);
    foreach (m[i]) for (int d = 0; d < 4; d++) begin rxd = 2'(m[i] >> (2 * d)); @(negedge clk50); end
    crs_dv = 0; rxd = 0;
    repeat (48) @(negedge clk50);
  endtask

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    repeat (10) @(posedge clk50); rst <= 0;
    for (int l = 0; l < H; l++) send(l, 48'hFFFF_FFFF_FFFF, 0, 8'(l));
    chk(n_ok == H && n_bad == 0, $sformatf("fcs ok %0d bad %0d", n_ok, n_bad));
    chk(dut.u_audio.held == 8'(H - 1), "audio sample reached the output stage");
    send(5, 48'h02_00_00_00_00_07, 0, 8'h99);      // another station: dropped
    send(7, 48'hFFFF_FFFF_FFFF, 1, 8'h55);         // corrupted in transit
    chk(n_bad == 1, "corrupted frame flagged");
    chk(dut.u_audio.held == 8'h55, "audio of the last accepted frame");
    send(9, 48'h02_00_00_00_00_02, 0, 8'h5A);      // own address: accepted
    chk(n_ok == H + 2 && n_bad == 1, $sformatf("own-address frame (the other station's frame also checks good): fcs ok %0d bad %0d", n_ok, n_bad));
    chk(dut.u_audio.held == 8'h5A, "audio of the own-address frame");
    // duty cycle: wait for a period start, then count high clocks
    repeat (300) @(posedge clk50);
    begin
      int hi;
      hi = 0;
      wait (dut.u_audio.cnt == 8'h01);
      @(posedge clk50);
      repeat (256) begin @(posedge clk50); if (aud_pwm) hi++; end
      chk(hi == 8'h5A, $sformatf("pwm high for %0d of 256 clocks, expected %0d", hi, 8'h5A));
    end
    for (int i = 0; i < W * H; i++)
      chk(dut.u_bram.mem[i] == model[i], $sformatf("pixel %0d: %h exp %h", i, dut.u_bram.mem[i], model[i]));
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
