// Testbench for audio_pwm: for a series of samples, the number of high
// cycles in a full 256-cycle PWM period must equal the sample value.
module tb_audio_pwm;
  logic clk = 0, rst = 1, sample_valid = 0, pwm;
  logic [7:0] sample = 0;
  int checks = 0, failures = 0;
  audio_pwm dut (.clk, .rst, .sample, .sample_valid, .pwm);
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < 20; t++) begin
      int hi; logic [7:0] s;
      hi = 0;
      s = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : 8'($urandom);
      @(negedge clk); sample = s; sample_valid = 1; @(negedge clk); sample_valid = 0;
      repeat (300) @(posedge clk);        // let a period start with the new sample
      repeat (256) begin @(posedge clk); #1; if (pwm) hi++; end
      checks++;
      if (hi != int'(s)) begin failures++; $display("FAIL sample %0d gave %0d high cycles", s, hi); end
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
