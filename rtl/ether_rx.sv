// RMII receive front end. It waits for carrier (crs_dv) and the preamble
// pattern 01 (00 dibits before it are skipped), accepts the start-of-frame delimiter's final dibit 11, and then
// forwards every dibit (destination address onwards, FCS included) with
// axiov high until the carrier drops. A dibit other than 01 or 11 in the
// preamble abandons the frame until the carrier drops. One register stage.
// Preamble and SFD handling are standard Ethernet; the structure is this
// design's own.
module ether_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       crs_dv,
  input  logic [1:0] rxd,
  output logic       axiov,
  output logic [1:0] axiod
);
  typedef enum logic [1:0] {R_IDLE, R_PRE, R_DATA, R_DROP} state_e;
  state_e st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= R_IDLE;
      axiov <= 1'b0;
      axiod <= 2'b00;
    end else begin
      axiov <= 1'b0;
      axiod <= rxd;
      if (!crs_dv) begin
        st <= R_IDLE;
      end else begin
        case (st)
          R_IDLE: if (rxd == 2'b01)      st <= R_PRE;
                  else if (rxd != 2'b00) st <= R_DROP;
          R_PRE:  if (rxd == 2'b11)      st <= R_DATA;
                  else if (rxd != 2'b01) st <= R_DROP;
          R_DATA: axiov <= 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
