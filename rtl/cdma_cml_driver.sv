// cdma_cml_driver - adds the eight chip streams into one multilevel line
// amplitude.
//
// In the chip, eight current-mode-logic differential pairs share one pair of
// 50-ohm loads, so the differential output voltage is the sum of the eight
// +/-1 chips times the swing of one code. Here the line amplitude is that sum
// as a signed integer in units of one code's amplitude: -8, -6, ... +8.
//
// Purely combinational. The analog driver is modelled only by its transfer
// function; the integer line amplitude is this design's representation.
module cdma_cml_driver
  import cdma_pkg::*;
(
  input  logic [N_CODES-1:0] chips,   // 1 = +1, 0 = -1
  output logic signed [4:0]  line
);

  always_comb begin
    line = '0;
    for (int i = 0; i < N_CODES; i++)
      line = line + (chips[i] ? 5'sd1 : -5'sd1);
  end

endmodule
