// Unsigned restoring divider, one quotient bit per cycle. start loads the
// operands; done pulses one cycle after WIDTH cycles with quotient and
// remainder. Used by center_of_mass. Divisor zero gives an all-ones quotient.
module divider #(
  parameter int unsigned WIDTH = 25
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy,
  output logic             done
);
  logic [WIDTH-1:0]         q, d;
  logic [WIDTH:0]           rem;
  logic [$clog2(WIDTH+1)-1:0] cnt;
  logic [WIDTH:0]           trial;

  assign trial = {rem[WIDTH-1:0], q[WIDTH-1]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      q    <= '0;
      d    <= '0;
      rem  <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= dividend;
        d    <= divisor;
        rem  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (trial[WIDTH]) begin
          rem <= {rem[WIDTH-1:0], q[WIDTH-1]};
          q   <= {q[WIDTH-2:0], 1'b0};
        end else begin
          rem <= trial;
          q   <= {q[WIDTH-2:0], 1'b1};
        end
        if (cnt == $bits(cnt)'(WIDTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient  <= trial[WIDTH] ? {q[WIDTH-2:0], 1'b0} : {q[WIDTH-2:0], 1'b1};
          remainder <= trial[WIDTH] ? rem[WIDTH-1:0] : trial[WIDTH-1:0];
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
