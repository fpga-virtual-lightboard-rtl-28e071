// Ethernet framer of the transmitter, one RMII dibit per 50 MHz clock
// (100 Mb/s). Each packet is, in bytes:
//   IPG 12 (idle) | preamble 7 x 55 | SFD D5 | destination FF:FF:FF:FF:FF:FF
//   | source SRC_MAC | length (2, value 3+PAYLOAD_BYTES)
//   | first-pixel address (3, most significant byte first)
//   | PAYLOAD_BYTES from the payload source | FCS (4)
// 12+8+14+3+321+4 = 362 byte times = 1448 clocks per packet by default;
// PAYLOAD_BYTES may be anything from 43 to 1497 (frame 64..1518 bytes).
// Every byte goes out least significant dibit first; the FCS is the
// inverted CRC-32 of destination..payload, sent crc[31] first. stall is low
// only in the payload phase, when axiod of the source is forwarded.
// The layout, broadcast address, IPG and the stall follow the design; the
// source MAC and the length value are this design's choices.
module eth_packer
  import lb_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 321,
  parameter int unsigned IPG_BYTES     = 12,
  parameter logic [47:0] SRC_MAC       = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        axiov,
  input  logic [1:0]  axiod,
  input  logic [16:0] pixel_addr,
  output logic        stall,
  output logic        phy_txen,
  output logic [1:0]  phy_txd
);
  typedef enum logic [2:0] {P_IPG, P_PRE, P_HDR, P_ADDR, P_PAY, P_FCS} phase_e;
  localparam logic [15:0] LEN = 16'(3 + PAYLOAD_BYTES);

  phase_e      ph;
  logic [10:0] bc;        // byte within the phase
  logic [1:0]  di;        // dibit within the byte
  logic [23:0] addr_l;
  logic [7:0]  cur;
  logic [1:0]  d;
  logic [31:0] crc;
  logic        crc_clr, crc_en;
  logic        last_byte;
  logic [4:0]  fcs_n;     // index of the first FCS bit in this dibit

  assign fcs_n = {bc[1:0], di, 1'b0};

  // byte being sent in phases other than payload and FCS
  always_comb begin
    cur = 8'h00;
    case (ph)
      P_PRE:  cur = (bc == 11'd7) ? 8'hD5 : 8'h55;
      P_HDR:  begin
        if (bc < 11'd6)       cur = BROADCAST_MAC[8*(3'd5 - bc[2:0]) +: 8];
        else if (bc < 11'd12) cur = SRC_MAC[8*(4'd11 - bc[3:0]) +: 8];
        else                 cur = LEN[8*(4'd13 - bc[3:0]) +: 8];
      end
      P_ADDR: cur = addr_l[8*(4'd2 - {2'b00, bc[1:0]}) +: 8];
      default: cur = 8'h00;
    endcase
    case (ph)
      P_PAY:   d = axiod;
      P_FCS:   d = ~{crc[5'd30 - fcs_n], crc[5'd31 - fcs_n]};
      default: d = cur[2*di +: 2];
    endcase
    case (ph)
      P_IPG:  last_byte = (bc == 11'(IPG_BYTES - 1));
      P_PRE:  last_byte = (bc == 11'd7);
      P_HDR:  last_byte = (bc == 11'd13);
      P_ADDR: last_byte = (bc == 11'd2);
      P_PAY:  last_byte = (bc == 11'(PAYLOAD_BYTES - 1));
      default: last_byte = (bc == 11'd3);
    endcase
  end

  assign stall   = (ph != P_PAY);
  assign crc_clr = (ph == P_PRE);
  assign crc_en  = (ph == P_HDR) || (ph == P_ADDR) || (ph == P_PAY);

  crc32_dibit u_crc (.clk, .clear(crc_clr || rst), .axiov(crc_en), .axiod(d), .crc);

  always_ff @(posedge clk) begin
    if (rst) begin
      ph       <= P_IPG;
      bc       <= '0;
      di       <= '0;
      addr_l   <= '0;
      phy_txen <= 1'b0;
      phy_txd  <= 2'b00;
    end else begin
      phy_txen <= (ph != P_IPG);
      phy_txd  <= (ph != P_IPG) ? d : 2'b00;
      di <= di + 2'd1;
      if (di == 2'd3) begin
        bc <= bc + 11'd1;
        if (last_byte) begin
          bc <= '0;
          case (ph)
            P_IPG:  ph <= P_PRE;
            P_PRE:  ph <= P_HDR;
            P_HDR:  begin
              ph     <= P_ADDR;
              addr_l <= 24'(pixel_addr);
            end
            P_ADDR: ph <= P_PAY;
            P_PAY:  ph <= P_FCS;
            default: ph <= P_IPG;
          endcase
        end
      end
    end
  end

  // the payload source must keep up once the payload phase has begun
  assert property (@(posedge clk) disable iff (rst) (ph == P_PAY) |-> axiov)
    else $error("eth_packer: payload source not ready");
endmodule
