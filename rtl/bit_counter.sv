// bit_counter: number of ones in a WIDTH-bit word (64 by default).
//
// Purely combinational, as in the published design: no registers inside, so
// the block that uses it registers the result. The count is built by a
// balanced tree of adders (pairs of bits, then pairs of pair sums, ...), which
// keeps the depth at log2(WIDTH) adder levels. The output is COUNT_W bits wide,
// enough to hold WIDTH itself.
module bit_counter #(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned COUNT_W = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0]   data,
  output logic [COUNT_W-1:0] count
);

  // Tree padded to a power of two; level l holds PAD >> l partial sums.
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned PAD    = 1 << LEVELS;

  logic [COUNT_W-1:0] sums [LEVELS+1][PAD];

  always_comb begin
    for (int i = 0; i < PAD; i++)
      sums[0][i] = (i < WIDTH) ? COUNT_W'(data[i]) : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < PAD; i++)
        sums[l][i] = (i < (PAD >> l)) ? sums[l-1][2*i] + sums[l-1][2*i+1] : '0;
    count = sums[LEVELS][0];
  end

endmodule
