// sine_carrier: the sine-carrier subsystem. It holds the control unit, the
// sine and carrier look-up memories and the processing unit with its two
// multiplexers, and delivers the constant-amplitude reference sines ref1
// (sine) and ref2 (inverted sine) together with the carrier sample.
//
// The memory reads take one clock, so the flag is delayed by one clock to
// stay aligned with the sine sample it selects. ref1, ref2 and carrier are
// therefore all valid one clock after the control unit's addresses change.
// Structure per the architecture; timing and sizes are this design's.
//
// Interface: tick is the sample-rate enable. `flag` is the aligned
// half-period flag (0: positive half of ref1).
module sine_carrier
  import pwm_pkg::*;
#(
  parameter int unsigned SINE_HALF_N = 200,
  parameter int unsigned CARRIER_N   = 510
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    tick,
  output sample_t ref1,
  output sample_t ref2,
  output sample_t carrier,
  output logic    flag
);

  localparam int unsigned SA_W = $clog2(SINE_HALF_N);
  localparam int unsigned CA_W = $clog2(CARRIER_N);

  logic [SA_W-1:0] sine_addr;
  logic [CA_W-1:0] carrier_addr;
  logic            flag_cu;
  sample_t         sine_data;

  control_unit #(.SINE_HALF_N(SINE_HALF_N), .CARRIER_N(CARRIER_N)) u_cu (
    .clk, .rst, .tick,
    .sine_addr, .carrier_addr, .flag(flag_cu)
  );

  sine_memory #(.N(SINE_HALF_N)) u_sine (
    .clk, .addr(sine_addr), .data(sine_data)
  );

  carrier_memory #(.N(CARRIER_N)) u_carrier (
    .clk, .addr(carrier_addr), .data(carrier)
  );

  always_ff @(posedge clk) begin
    if (rst) flag <= 1'b0;
    else     flag <= flag_cu;
  end

  sine_processing_unit u_pu (
    .sine_data, .flag, .ref1, .ref2
  );

endmodule
