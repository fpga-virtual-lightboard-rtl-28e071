// Testbench for ether_rx: frames with leading idle dibits, preamble and SFD
// must come out as exactly their body dibits; a burst without a valid
// preamble must produce nothing.
module tb_ether_rx;
  logic clk = 0, rst = 1, crs_dv = 0, axiov;
  logic [1:0] rxd = 0, axiod;
  int checks = 0, failures = 0;
  ether_rx dut (.clk, .rst, .crs_dv, .rxd, .axiov, .axiod);
  always #5 clk = ~clk;

  logic [1:0] got [$];
  always @(posedge clk) if (!rst && axiov) got.push_back(axiod);

  task automatic frame(logic [1:0] body [$], bit good);
    @(negedge clk);
    crs_dv = 1; rxd = 2'b00; @(negedge clk);
    for (int i = 0; i < 31; i++) begin rxd = good ? 2'b01 : 2'b10; @(negedge clk); end
    rxd = 2'b11; @(negedge clk);
    foreach (body[i]) begin rxd = body[i]; @(negedge clk); end
    crs_dv = 0; rxd = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    logic [1:0] body [$];
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 10; t++) begin
      bit good;
      good = (t != 4);
      body.delete();
      repeat ($urandom_range(200, 20)) body.push_back(2'($urandom));
      got.delete();
      frame(body, good);
      checks++;
      if (good ? (got != body) : (got.size() != 0)) begin
        failures++; $display("FAIL frame %0d: %0d dibits out, %0d in", t, got.size(), body.size());
      end
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
