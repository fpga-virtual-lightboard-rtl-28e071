// Testbench for pixel_bram at full size with unrelated clocks on the two
// ports: random writes through port A, then reads on both ports compared
// with a reference copy, including the two-cycle latency and read-first.
module tb_pixel_bram;
  logic clka = 0, clkb = 0, wea = 0;
  logic [16:0] addra = 0, addrb = 0;
  logic [7:0] dina = 0, douta, doutb;
  logic [7:0] ref_m [int];
  int checks = 0, failures = 0;
  pixel_bram dut (.clka, .wea, .addra, .dina, .douta, .clkb, .addrb, .doutb);
  always #5 clka = ~clka;
  always #7 clkb = ~clkb;

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int keys [$];
    repeat (2) @(posedge clka);
    for (int i = 0; i < 500; i++) begin
      int a;
      a = (i == 0) ? 76799 : int'($urandom_range(76799));
      @(negedge clka); wea = 1; addra = 17'(a); dina = 8'($urandom);
      ref_m[a] = dina; keys.push_back(a);
    end
    @(negedge clka); wea = 0;
    // never-written word reads zero
    @(negedge clkb); addrb = 17'd5; if (ref_m.exists(5)) addrb = 17'd6;
    @(posedge clkb); @(posedge clkb); #1;
    chk(doutb == 8'h00, "unwritten word is zero");
    foreach (keys[k]) begin
      int a; a = keys[k];
      @(negedge clkb); addrb = 17'(a);
      @(posedge clkb); #1;
      @(posedge clkb); #1;
      chk(doutb == ref_m[a], $sformatf("port B %0d: %h exp %h", a, doutb, ref_m[a]));
      @(negedge clka); addra = 17'(a);
      @(posedge clka); #1;
      @(posedge clka); #1;
      chk(douta == ref_m[a], $sformatf("port A %0d", a));
    end
    // read-first: a write returns the old value two cycles later
    @(negedge clka); addra = 17'(keys[0]); wea = 1; dina = ~ref_m[keys[0]];
    @(negedge clka); wea = 0;
    @(posedge clka); #1;
    chk(douta == ref_m[keys[0]], "read-first");
    @(posedge clka); @(posedge clka); #1;
    chk(douta == ~ref_m[keys[0]], "new value after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clka);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
