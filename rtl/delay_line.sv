// delay_line: fixed delay of DEPTH clocks for a WIDTH-bit signal (the
// carrier "Delay" of the architecture). It holds the carrier sample back by
// the latency of the amplitude scalers so that every comparator sees a
// carrier and a sine taken at the same sample instant. The architecture
// names the delay; its depth (one clock, the scalers' latency) is this
// design's. Reset (synchronous, active high) clears the stages.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("delay_line: DEPTH must be at least 1");

endmodule
