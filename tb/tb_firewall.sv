// Testbench for firewall: MSb-first frames to the broadcast address, to
// this station and to another station. The first two must come out without
// their 14-byte header, the third not at all.
module tb_firewall;
  logic clk = 0, rst = 1, axiiv = 0, axiov;
  logic [1:0] axiid = 0, axiod;
  int checks = 0, failures = 0;
  firewall dut (.clk, .rst, .axiiv, .axiid, .axiov, .axiod);
  always #5 clk = ~clk;
  byte unsigned got [$];
  logic [7:0] b; int nd = 0;
  always @(posedge clk) if (!rst && axiov) begin
    b = {b[5:0], axiod}; nd++;
    if (nd == 4) begin got.push_back(b); nd = 0; end
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 9; t++) begin
      byte unsigned m [$], pl [$];
      logic [47:0] dst;
      bit pass;
      m.delete(); pl.delete();
      case (t % 3)
        0: dst = 48'hFFFF_FFFF_FFFF;
        1: dst = 48'h02_00_00_00_00_02;
        default: dst = 48'h02_00_00_00_00_03;
      endcase
      pass = (t % 3) != 2;
      for (int i = 5; i >= 0; i--) m.push_back(dst[8*i +: 8]);
      repeat (8) m.push_back(8'($urandom));
      repeat ($urandom_range(50, 1)) pl.push_back(8'($urandom));
      foreach (pl[i]) m.push_back(pl[i]);
      got.delete(); nd = 0;
      foreach (m[i]) for (int d = 3; d >= 0; d--) begin
        @(negedge clk); axiiv = 1; axiid = 2'(m[i] >> (2 * d));
      end
      @(negedge clk); axiiv = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (pass ? (got != pl) : (got.size() != 0)) begin failures++; $display("FAIL frame %0d got %0d bytes", t, got.size()); end
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
