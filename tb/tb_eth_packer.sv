// Testbench for eth_packer at its default 321-byte payload. A behavioural
// payload source supplies random bytes whenever stall is low. The RMII
// output is decoded and checked field by field: 12-byte idle gap, preamble,
// SFD, broadcast destination, source, length 324, the 3-byte address, the
// payload, and the FCS against a byte-wise reference CRC-32. Each packet
// must take 1448 clocks (362 byte times).
module tb_eth_packer;
  localparam int PB = 321;
  logic clk = 0, rst = 1, stall, phy_txen;
  logic [1:0] phy_txd, axiod;
  logic [16:0] pixel_addr = 17'h1_2345;
  int checks = 0, failures = 0;

  byte unsigned pay [$];     // bytes offered by the source, in order
  int pi = 0, pd = 0;
  assign axiod = 2'(pay[pi] >> (2 * pd));

  eth_packer dut (.clk, .rst, .axiov(1'b1), .axiod, .pixel_addr, .stall, .phy_txen, .phy_txd);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && !stall) begin
    pd = pd + 1;
    if (pd == 4) begin pd = 0; pi++; end
  end

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

  // collect frames
  byte unsigned fr [$];
  logic [7:0] b;
  int nd = 0, cyc = 0, start_cyc [$], idle = 0, idle_gap [$];
  logic en_q = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    cyc++;
    if (phy_txen && !en_q) begin start_cyc.push_back(cyc); idle_gap.push_back(idle); end
    if (!phy_txen) idle++; else idle = 0;
    if (phy_txen) begin
      b = {phy_txd, b[7:2]}; nd++;
      if (nd == 4) begin fr.push_back(b); nd = 0; end
    end
    en_q = phy_txen;
  end

  initial begin
    int off, pbase;
    for (int i = 0; i < 4 * PB; i++) pay.push_back(8'($urandom));
    repeat (3) @(posedge clk); rst <= 0;
    wait (start_cyc.size() == 4);
    // frame length on the wire: 8 + 14 + 3 + PB + 4 = 350 bytes
    chk(fr.size() >= 3 * 350, "three frames captured");
    for (int f = 0; f < 3; f++) begin
      byte unsigned body [$];
      logic [31:0] fcs;
      body.delete();
      off = f * 350;
      for (int i = 0; i < 7; i++) chk(fr[off + i] == 8'h55, "preamble");
      chk(fr[off + 7] == 8'hD5, "SFD");
      for (int i = 0; i < 6; i++) chk(fr[off + 8 + i] == 8'hFF, "broadcast destination");
      chk({fr[off+14], fr[off+15], fr[off+16], fr[off+17], fr[off+18], fr[off+19]} == 48'h02_00_00_00_00_01, "source");
      chk({fr[off + 20], fr[off + 21]} == 16'd324, "length");
      chk({fr[off + 22], fr[off + 23], fr[off + 24]} == 24'h01_2345, "address field");
      pbase = f * PB;
      for (int i = 0; i < PB; i++)
        if (fr[off + 25 + i] != pay[pbase + i]) begin chk(0, $sformatf("payload byte %0d", i)); break; end
      checks++;
      for (int i = 8; i < 25 + PB; i++) body.push_back(fr[off + i]);
      fcs = ref_crc(body);
      chk({fr[off+25+PB+3], fr[off+25+PB+2], fr[off+25+PB+1], fr[off+25+PB]} == fcs, $sformatf("FCS frame %0d", f));
      chk(start_cyc[f + 1] - start_cyc[f] == 1448, $sformatf("packet period %0d", start_cyc[f + 1] - start_cyc[f]));
      chk(idle_gap[f + 1] == 48, $sformatf("IPG %0d clocks", idle_gap[f + 1]));
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
