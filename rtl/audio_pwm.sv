// Audio output of the receiver. Each received 8-bit sample (one per packet,
// about 34.5 k samples/s) is held and played as pulse-width modulation with
// a 256-clock period: pwm is high for `sample` clocks of every 256
// (195 kHz carrier at 50 MHz), which the board's low-pass output stage turns
// into a voltage. A new sample takes effect at the start of the next period.
// Sending one sample per packet follows the design; PWM is this design's
// choice for the unnamed output of the audio block.
module audio_pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sample,
  input  logic       sample_valid,
  output logic       pwm
);
  logic [7:0] held, cur, cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      held <= '0;
      cur  <= '0;
      cnt  <= '0;
      pwm  <= 1'b0;
    end else begin
      if (sample_valid) held <= sample;
      cnt <= cnt + 8'd1;
      if (cnt == 8'hFF) cur <= sample_valid ? sample : held;
      pwm <= (cnt < cur);
    end
  end
endmodule
