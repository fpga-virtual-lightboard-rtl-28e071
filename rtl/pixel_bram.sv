// Frame buffer: DEPTH words of WIDTH bits (320x240 x 8 by default), true
// dual port with a clock per port, as a block RAM with output register.
// Port A reads and writes (read-first), port B only reads. Both ports have a
// two-cycle read latency: the address is registered, then the data. The
// memory starts cleared, as an FPGA block RAM does after configuration.
// The size and the dual-clock use follow the design; the latency register
// layout is this design's choice.
module pixel_bram #(
  parameter int unsigned DEPTH = 76800,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clka,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  output logic [WIDTH-1:0] douta,
  input  logic             clkb,
  input  logic [AW-1:0]    addrb,
  output logic [WIDTH-1:0] doutb
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] ra, rb;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clka) begin
    if (addra < AW'(DEPTH)) begin
      ra <= mem[addra];
      if (wea) mem[addra] <= dina;
    end else begin
      ra <= '0;
    end
    douta <= ra;
  end

  always_ff @(posedge clkb) begin
    rb    <= (addrb < AW'(DEPTH)) ? mem[addrb] : '0;
    doutb <= rb;
  end
endmodule
