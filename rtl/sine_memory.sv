// sine_memory: read-only look-up table of one half period of the reference
// sine, in the unsigned 8-bit convention (zero line at 128).
//
// Entry i holds round(128 + 127 * sin(pi * i / N)), i = 0 .. N-1, so values
// run from 128 up to 255 and back. The table is computed at elaboration; the
// read is registered, as in a block RAM, so data follows addr by one clock.
// Storing the half-wave and obtaining the other half by mirroring (see
// sine_processing_unit) follows the processing unit and flag of the
// architecture; N = 200 (400 carrier periods per fundamental, i.e. 20 kHz
// switching for a 50 Hz output) is this design's choice.
module sine_memory
  import pwm_pkg::*;
#(
  parameter int unsigned N = 200,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output sample_t       data
);

  typedef sample_t table_t [N];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < int'(N); i++)
      t[i] = sample_t'(MID + $rtoi(127.0 * $sin(3.141592653589793 * real'(i) / real'(N)) + 0.5));
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk)
    data <= ROM[addr];

endmodule
