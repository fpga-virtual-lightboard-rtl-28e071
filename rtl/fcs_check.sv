// Frame check sequence verification. The raw received dibits (wire order,
// FCS included) run through crc32_dibit; between frames the CRC register is
// preset. When axiiv falls, done pulses for one cycle and ok tells whether
// the register holds the CRC-32 residue C704DD7B, i.e. the frame arrived
// intact. The result is a status flag only: the pixels of the frame have
// already been stored. Checking the whole frame with CRC-32 follows the
// design; the residue method is this design's choice.
module fcs_check
  import lb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       axiiv,
  input  logic [1:0] axiid,
  output logic       done,
  output logic       ok
);
  logic [31:0] crc;
  logic        v_q;

  crc32_dibit u_crc (.clk, .clear(rst || (!axiiv && !v_q)), .axiov(axiiv), .axiod(axiid), .crc);

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q  <= 1'b0;
      done <= 1'b0;
      ok   <= 1'b0;
    end else begin
      v_q  <= axiiv;
      done <= v_q && !axiiv;
      if (v_q && !axiiv) ok <= (crc == CRC_RESIDUE);
    end
  end
endmodule
