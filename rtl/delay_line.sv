// Fixed delay of DEPTH clock cycles for a WIDTH-bit signal (DEPTH >= 1).
// Used to keep positions and syncs aligned with pipelined data.
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r [DEPTH];
  always_ff @(posedge clk) begin
    r[0] <= d;
    for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
  end
  assign q = r[DEPTH-1];
endmodule
