// Testbench for fcs_check: frames carrying a correct FCS (computed here
// byte-wise) must be reported ok, frames with one flipped bit not ok; each
// frame gives exactly one done pulse.
module tb_fcs_check;
  logic clk = 0, rst = 1, axiiv = 0, done, ok;
  logic [1:0] axiid = 0;
  int checks = 0, failures = 0, dones = 0;
  fcs_check dut (.clk, .rst, .axiiv, .axiid, .done, .ok);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && done) dones++;

  function automatic logic [31:0] ref_crc(byte unsigned m [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (m[i]) begin
      c ^= 32'(m[i]);
      repeat (8) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : (c >> 1);
    end
    return ~c;
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 30; t++) begin
      byte unsigned m [$];
      logic [31:0] f;
      bit bad;
      int d0;
      m.delete();
      repeat ($urandom_range(100, 20)) m.push_back(8'($urandom));
      f = ref_crc(m);
      for (int k = 0; k < 4; k++) m.push_back(8'(f >> (8 * k)));
      bad = t[0];
      if (bad) m[$urandom_range(m.size() - 1)] ^= 8'(1 << $urandom_range(7));
      d0 = dones;
      foreach (m[i]) for (int d = 0; d < 4; d++) begin
        @(negedge clk); axiiv = 1; axiid = 2'(m[i] >> (2 * d));
      end
      @(negedge clk); axiiv = 0;
      repeat (4) @(negedge clk);
      checks += 2;
      if (dones != d0 + 1) begin failures++; $display("FAIL done count"); end
      if (ok != !bad) begin failures++; $display("FAIL frame %0d ok=%0d bad=%0d", t, ok, bad); end
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
