// carrier_memory: read-only look-up table of one period of the triangular
// carrier, full scale 0..255.
//
// With H = N/2, entry i holds floor(255 * i / H) for i <= H and
// floor(255 * (N - i) / H) above. With the default N = 510 the table rises by
// one per sample from 0 to 255 and falls back to 1, so that the next period
// starts again at 0. The table is computed at elaboration; the read is
// registered, as in a block RAM, so data follows addr by one clock. The
// carrier shape follows the architecture; N is this design's choice.
module carrier_memory
  import pwm_pkg::*;
#(
  parameter int unsigned N = 510,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output sample_t       data
);

  typedef sample_t table_t [N];

  function automatic table_t make_table();
    table_t t;
    int unsigned half;
    half = N / 2;
    for (int unsigned i = 0; i < N; i++)
      t[i] = (i <= half) ? sample_t'((i * 255) / half)
                         : sample_t'(((N - i) * 255) / half);
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk)
    data <= ROM[addr];

endmodule
