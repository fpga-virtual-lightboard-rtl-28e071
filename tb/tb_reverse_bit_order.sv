// Testbench for reverse_bit_order with a small frame (8x3) held in a
// behavioural two-cycle-latency RAM. stall is driven randomly; every dibit
// taken while axiov is high is reassembled LSb-first, and each line must
// come out as its 8 pixels followed by the audio byte, with pixel_addr at
// the line's first pixel, lines cycling 0,1,2,0,...
module tb_reverse_bit_order;
  localparam int W = 8, H = 3;
  logic clk = 0, rst = 1, stall = 1, axiov;
  logic [7:0] vol_data = 8'h5A, pixel_out_rbo;
  logic [16:0] pixel_addr_rbo, pixel_addr;
  logic [1:0] axiod;
  logic [7:0] mem [W * H];
  logic [7:0] r1;
  int checks = 0, failures = 0;

  reverse_bit_order #(.FRAME_W(W), .FRAME_H(H)) dut (.clk, .rst, .stall, .vol_data, .pixel_out_rbo,
                     .pixel_addr_rbo, .axiov, .axiod, .pixel_addr);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    r1 <= (pixel_addr_rbo < W * H) ? mem[pixel_addr_rbo] : 8'hEE;
    pixel_out_rbo <= r1;
  end

  byte unsigned got [$];
  logic [7:0] cur;
  int nd = 0;
  int line_addr [$];
  always @(posedge clk) if (!rst && axiov) begin
    if (got.size() % (W + 1) == 0 && nd == 0) line_addr.push_back(int'(pixel_addr));
    cur = {axiod, cur[7:2]};
    nd++;
    if (nd == 4) begin got.push_back(cur); nd = 0; end
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk);
    while (got.size() < 7 * (W + 1)) begin
      @(negedge clk);
      stall = ($urandom_range(3) == 0);
      if (nd == 0 && got.size() % (W + 1) == 0) begin stall = 1; repeat (8) @(negedge clk); stall = 0; end
    end
    stall = 1;
    for (int l = 0; l < 7; l++) begin
      for (int p = 0; p < W; p++) begin
        checks++;
        if (got[l * (W + 1) + p] != mem[(l % H) * W + p]) begin
          failures++; $display("FAIL line %0d pixel %0d: %h exp %h", l, p, got[l * (W + 1) + p], mem[(l % H) * W + p]);
        end
      end
      checks++; if (got[l * (W + 1) + W] != 8'h5A) begin failures++; $display("FAIL audio byte"); end
      checks++; if (line_addr[l] != (l % H) * W) begin failures++; $display("FAIL line address %0d", line_addr[l]); end
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
