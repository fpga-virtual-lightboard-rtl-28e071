// Payload splitter of the receiver. Input: the payload dibits, most
// significant bit first, from the firewall. Bytes are assembled and counted
// from the start of each frame: bytes 0..2 form the 24-bit address of the
// first pixel (valid_addr pulses after byte 2), the next PIXELS bytes are
// pixels (one valid_pixel pulse each), the next byte is the audio sample
// (audio_valid). Anything after that (the FCS) is ignored. Each pulse comes
// in the cycle after the byte's last dibit. The field layout follows the
// design; the counting scheme is this design's own.
module image_audio_split #(
  parameter int unsigned PIXELS = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        axiiv,
  input  logic [1:0]  axiid,
  output logic [23:0] addr,
  output logic        valid_addr,
  output logic [7:0]  pixel,
  output logic        valid_pixel,
  output logic [7:0]  audio,
  output logic        audio_valid
);
  logic [5:0] part;
  logic [1:0] dc;
  logic [10:0] bc;
  logic [7:0] byte_w;

  assign byte_w = {part, axiid};

  always_ff @(posedge clk) begin
    if (rst) begin
      part <= '0;
      dc   <= '0;
      bc   <= '0;
      addr <= '0;
      pixel <= '0;
      audio <= '0;
      valid_addr  <= 1'b0;
      valid_pixel <= 1'b0;
      audio_valid <= 1'b0;
    end else begin
      valid_addr  <= 1'b0;
      valid_pixel <= 1'b0;
      audio_valid <= 1'b0;
      if (!axiiv) begin
        dc <= '0;
        bc <= '0;
      end else begin
        dc   <= dc + 2'd1;
        part <= {part[3:0], axiid};
        if (dc == 2'd3) begin
          if (bc != 11'h7FF) bc <= bc + 11'd1;
          if (bc < 11'd3) begin
            addr <= {addr[15:0], byte_w};
            if (bc == 11'd2) valid_addr <= 1'b1;
          end else if (bc < 11'(3 + PIXELS)) begin
            pixel       <= byte_w;
            valid_pixel <= 1'b1;
          end else if (bc == 11'(3 + PIXELS)) begin
            audio       <= byte_w;
            audio_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
