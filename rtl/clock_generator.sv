// clock_generator: derives the sample-rate enable of the modulator from the
// board clock.
//
// A two-state FSM (PHASE_A / PHASE_B) halves the input clock, as the
// architecture prescribes. The frequency synthesizer that follows it in an
// FPGA (a Digital Clock Manager with CLKFX_MULTIPLY and CLKFX_DIVIDE) is a
// vendor primitive; here its ratio is realised as a fractional clock enable:
// on every PHASE_B cycle an accumulator adds CLKFX_MULTIPLY and, when it
// reaches CLKFX_DIVIDE, subtracts it and raises `tick` for one clock. The
// rate of `tick` is therefore f_clk/2 * CLKFX_MULTIPLY/CLKFX_DIVIDE, which
// requires CLKFX_MULTIPLY <= CLKFX_DIVIDE. The whole modulator stays in the
// one clock domain of `clk` and advances on `tick` (this design's choice,
// instead of a second clock).
//
// Defaults (this design's): 50 MHz board clock, 51/125 gives a 10.2 MHz
// sample rate, i.e. 510 carrier samples per period at the 20 kHz switching
// frequency.
//
// Interface: clk, rst (synchronous, active high); tick is a registered
// one-clock pulse; div2 is the FSM's halved clock, exposed for observation.
module clock_generator #(
  parameter int unsigned CLKFX_MULTIPLY = 51,
  parameter int unsigned CLKFX_DIVIDE   = 125
) (
  input  logic clk,
  input  logic rst,
  output logic div2,
  output logic tick
);

  typedef enum logic {PHASE_A, PHASE_B} phase_e;
  phase_e state;

  localparam int unsigned ACC_W = $clog2(CLKFX_DIVIDE + CLKFX_MULTIPLY + 1);
  logic [ACC_W-1:0] acc, acc_sum;

  assign acc_sum = acc + ACC_W'(CLKFX_MULTIPLY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= PHASE_A;
      acc   <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= 1'b0;
      unique case (state)
        PHASE_A: state <= PHASE_B;
        PHASE_B: begin
          state <= PHASE_A;
          if (acc_sum >= ACC_W'(CLKFX_DIVIDE)) begin
            acc  <= acc_sum - ACC_W'(CLKFX_DIVIDE);
            tick <= 1'b1;
          end else begin
            acc  <= acc_sum;
          end
        end
        default: state <= PHASE_A;
      endcase
    end
  end

  assign div2 = (state == PHASE_B);

  initial begin
    assert (CLKFX_MULTIPLY >= 1 && CLKFX_MULTIPLY <= CLKFX_DIVIDE)
      else $error("clock_generator: need 1 <= CLKFX_MULTIPLY <= CLKFX_DIVIDE");
  end

endmodule
