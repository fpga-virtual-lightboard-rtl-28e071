// Payload source of the transmitter. It walks the Ethernet copy of the frame
// in runs of PIXELS_PER_PACKET pixels (by default one line, 320), each run
// followed by one audio byte, each byte sent as four dibits least
// significant pair first (Ethernet bit order). Runs cycle through the whole
// frame, which must hold a whole number of them. It presents a dibit on
// axiod whenever it is not stalled; the packer holds stall high while it
// sends everything that is not payload.
// Reading: pixel_addr_rbo always points at the byte after the one being
// sent, so the two-cycle RAM answer is ready when the current byte's fourth
// dibit leaves. Before each run a short LOAD phase fetches its first pixel.
// pixel_addr is the address of the first pixel of the run being sent, for
// the packet's address field. The audio byte is vol_data at the moment the
// last pixel is finished.
// The line-per-packet stream, the adjustable packet size, the address
// tracking and the stall follow the design; the prefetch scheme is this
// design's choice.
module reverse_bit_order #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned PIXELS_PER_PACKET = FRAME_W
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  input  logic [7:0]  vol_data,
  input  logic [7:0]  pixel_out_rbo,
  output logic [16:0] pixel_addr_rbo,
  output logic        axiov,
  output logic [1:0]  axiod,
  output logic [16:0] pixel_addr
);
  typedef enum logic [1:0] {S_LOAD, S_RUN} state_e;
  state_e      st;
  logic [1:0]  lcnt;
  localparam int unsigned NPIX = FRAME_W * FRAME_H;
  logic [10:0] bi;        // byte of the packet: pixels 0..PIXELS_PER_PACKET-1, then audio
  logic [1:0]  di;
  logic [7:0]  sh;
  logic [16:0] base;

  assign pixel_addr     = base;
  assign pixel_addr_rbo = (st == S_LOAD) ? base : base + 17'(bi) + 17'd1;
  assign axiov          = (st == S_RUN) && !stall;
  assign axiod          = sh[2*di +: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= S_LOAD;
      lcnt <= '0;
      bi   <= '0;
      di   <= '0;
      sh   <= '0;
      base <= '0;
    end else begin
      case (st)
        S_LOAD: begin
          lcnt <= lcnt + 2'd1;
          if (lcnt == 2'd3) begin
            sh <= pixel_out_rbo;
            bi <= '0;
            di <= '0;
            st <= S_RUN;
          end
        end
        S_RUN: if (!stall) begin
          di <= di + 2'd1;
          if (di == 2'd3) begin
            if (bi == 11'(PIXELS_PER_PACKET)) begin
              lcnt <= '0;
              st   <= S_LOAD;
              base <= (base == 17'(NPIX - PIXELS_PER_PACKET)) ? '0 : base + 17'(PIXELS_PER_PACKET);
            end else begin
              bi <= bi + 11'd1;
              sh <= (bi == 11'(PIXELS_PER_PACKET - 1)) ? vol_data : pixel_out_rbo;
            end
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
