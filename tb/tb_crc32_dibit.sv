// Testbench for crc32_dibit: the standard CRC-32 check string "123456789"
// sent in Ethernet bit order must give CBF43926 once reflected and
// inverted; random messages are compared with a byte-wise reflected CRC-32
// (polynomial EDB88320), and the residue after appending the FCS is checked.
module tb_crc32_dibit;
  logic clk = 0, clear = 1, axiov = 0;
  logic [1:0] axiod = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;
  crc32_dibit dut (.clk, .clear, .axiov, .axiod, .crc);
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_crc(byte unsigned m [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (m[i]) begin
      c ^= 32'(m[i]);
      repeat (8) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : (c >> 1);
    end
    return ~c;
  endfunction
  function automatic logic [31:0] rev(logic [31:0] x);
    for (int i = 0; i < 32; i++) rev[i] = x[31 - i];
  endfunction

  task automatic send(byte unsigned m [$]);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (m[i]) for (int d = 0; d < 4; d++) begin
      axiov = 1; axiod = 2'(m[i] >> (2 * d));
      @(negedge clk);
    end
    axiov = 0;
  endtask

  initial begin
    byte unsigned msg [$];
    msg = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    send(msg);
    checks++; if (~rev(crc) != 32'hCBF4_3926) begin failures++; $display("FAIL check value %h", ~rev(crc)); end
    for (int t = 0; t < 40; t++) begin
      logic [31:0] f;
      msg.delete();
      repeat ($urandom_range(60, 1)) msg.push_back(8'($urandom));
      send(msg);
      f = ref_crc(msg);
      checks++; if (~rev(crc) != f) begin failures++; $display("FAIL crc %h exp %h", ~rev(crc), f); end
      for (int k = 0; k < 4; k++) msg.push_back(8'(f >> (8 * k)));
      send(msg);
      checks++; if (crc != 32'hC704_DD7B) begin failures++; $display("FAIL residue %h", crc); end
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
