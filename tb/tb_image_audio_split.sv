// Testbench for image_audio_split at the full 320 pixels: payloads of
// address, pixels, audio and a trailing FCS; checks the address, every
// pixel in order, the audio byte, and that the FCS produces nothing.
module tb_image_audio_split;
  logic clk = 0, rst = 1, axiiv = 0, valid_addr, valid_pixel, audio_valid;
  logic [1:0] axiid = 0;
  logic [23:0] addr;
  logic [7:0] pixel, audio;
  int checks = 0, failures = 0;
  image_audio_split dut (.clk, .rst, .axiiv, .axiid, .addr, .valid_addr, .pixel, .valid_pixel, .audio, .audio_valid);
  always #5 clk = ~clk;
  logic [23:0] ga [$]; byte unsigned gp [$], gaud [$];
  always @(posedge clk) if (!rst) begin
    if (valid_addr) ga.push_back(addr);
    if (valid_pixel) gp.push_back(pixel);
    if (audio_valid) gaud.push_back(audio);
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 3; t++) begin
      byte unsigned m [$], px [$];
      logic [23:0] a; logic [7:0] au;
      m.delete(); px.delete();
      a = 24'(t * 320 + 5); au = 8'($urandom);
      m.push_back(a[23:16]); m.push_back(a[15:8]); m.push_back(a[7:0]);
      repeat (320) begin px.push_back(8'($urandom)); m.push_back(px[$]); end
      m.push_back(au);
      repeat (4) m.push_back(8'($urandom));
      ga.delete(); gp.delete(); gaud.delete();
      foreach (m[i]) for (int d = 3; d >= 0; d--) begin
        @(negedge clk); axiiv = 1; axiid = 2'(m[i] >> (2 * d));
      end
      @(negedge clk); axiiv = 0;
      repeat (3) @(negedge clk);
      checks += 3;
      if (ga.size() != 1 || ga[0] != a) begin failures++; $display("FAIL address"); end
      if (gp != px) begin failures++; $display("FAIL pixels (%0d)", gp.size()); end
      if (gaud.size() != 1 || gaud[0] != au) begin failures++; $display("FAIL audio"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
