// cdma_rotator - rotates the order of the eight ring-oscillator clocks.
//
// Sampler clock i is ring clock (i + rot) mod 8, so each increment of `rot`
// (CntMUX from the code synchronizer's control unit) moves every sampler
// clock, and with it the receiver's symbol boundary, one chip later.
// The receiver passes the per-slot clock strobes (cdma_ring_phases.rise)
// through it.
//
// Purely combinational. The 3-bit CntMUX width is the one shown for the
// rotator control; the rotation direction is this design's choice.
module cdma_rotator (
  input  logic [7:0] clk_in,
  input  logic [2:0] rot,
  output logic [7:0] clk_out
);

  always_comb begin
    for (int i = 0; i < 8; i++)
      clk_out[i] = clk_in[3'(i) + rot];
  end

endmodule
