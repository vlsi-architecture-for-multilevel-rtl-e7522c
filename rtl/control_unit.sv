// control_unit: address generator of the sine-carrier subsystem.
//
// On every sample tick the carrier address steps through the CARRIER_N
// samples of one carrier period. At the end of each carrier period the sine
// address steps once, so one stored sine sample is used for a whole carrier
// period; at the end of the SINE_HALF_N samples of the stored half-wave the
// `flag` output toggles, marking the other half of the fundamental. The
// fundamental frequency is thus f_tick / (2 * SINE_HALF_N * CARRIER_N) and
// the switching frequency f_tick / CARRIER_N. The stepping scheme is this
// design's choice; the architecture only names the unit, its two addresses
// and the flag.
//
// Interface: tick is the sample-rate enable; outputs are registers and
// change on the clock edge where tick is high. Reset (synchronous, active
// high) sets all to zero; `period_end` pulses with the tick that starts a
// new carrier period.
module control_unit #(
  parameter int unsigned SINE_HALF_N = 200,
  parameter int unsigned CARRIER_N   = 510,
  localparam int unsigned SA_W = $clog2(SINE_HALF_N),
  localparam int unsigned CA_W = $clog2(CARRIER_N)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            tick,
  output logic [SA_W-1:0] sine_addr,
  output logic [CA_W-1:0] carrier_addr,
  output logic            flag
);

  logic carrier_wrap, sine_wrap;
  assign carrier_wrap = (carrier_addr == CA_W'(CARRIER_N - 1));
  assign sine_wrap    = (sine_addr == SA_W'(SINE_HALF_N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      carrier_addr <= '0;
      sine_addr    <= '0;
      flag         <= 1'b0;
    end else if (tick) begin
      if (carrier_wrap) begin
        carrier_addr <= '0;
        if (sine_wrap) begin
          sine_addr <= '0;
          flag      <= ~flag;
        end else begin
          sine_addr <= sine_addr + 1'b1;
        end
      end else begin
        carrier_addr <= carrier_addr + 1'b1;
      end
    end
  end

endmodule
