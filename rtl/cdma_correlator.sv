// cdma_correlator - correlation of one symbol of samples with one code.
//
// Each of the eight samples passes a 2x2 crossbar switch that keeps or swaps
// the differential pair according to the code bit (1 keeps, i.e. multiplies
// by +1; 0 swaps, i.e. multiplies by -1). The multi-input adder sums the
// eight results. Here the result is the exact signed sum.
//
// Purely combinational; corr has 4 more bits than a sample so the sum of
// eight samples cannot overflow.
module cdma_correlator
  import cdma_pkg::*;
#(
  parameter int unsigned SW = 8
) (
  input  logic signed [SW-1:0]   samples [8],
  input  code_t                  code,
  output logic signed [SW+3:0]   corr
);

  always_comb begin
    corr = '0;
    for (int n = 0; n < 8; n++)
      corr = code[n] ? corr + (SW+4)'(samples[n]) : corr - (SW+4)'(samples[n]);
  end

endmodule
