// CRC-32 over an RMII dibit stream, two bits per clock. The register is
// non-reflected (MSb-first, polynomial 04C11DB7, preset to all ones by
// clear), and the bits enter in wire order: axiod[0] first, then axiod[1].
// Fed like this it computes the Ethernet FCS: the transmitter sends the
// inverted register, crc[31] first; a receiver that also runs the FCS
// through it is left with the residue C704DD7B for an intact frame.
// crc is the register value, updated the cycle after each valid dibit;
// clear has priority over axiov.
module crc32_dibit (
  input  logic        clk,
  input  logic        clear,
  input  logic        axiov,
  input  logic [1:0]  axiod,
  output logic [31:0] crc
);
  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  function automatic logic [31:0] step(logic [31:0] c, logic b);
    return {c[30:0], 1'b0} ^ ((c[31] ^ b) ? POLY : 32'h0);
  endfunction

  always_ff @(posedge clk) begin
    if (clear)      crc <= 32'hFFFF_FFFF;
    else if (axiov) crc <= step(step(crc, axiod[0]), axiod[1]);
  end
endmodule
