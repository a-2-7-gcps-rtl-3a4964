// cdma_ring_phases - the eight phase clocks of the 8-stage ring oscillator,
// expressed in the chip-rate clock domain.
//
// The ring oscillator of the chip delivers eight clocks ck0..ck7, each with a
// 50% duty cycle and each one chip period later than the one before; one
// full cycle of any of them is one 8-chip symbol. Here the chip-rate clock
// `clk` (the PLL output, 2.7 GHz in the chip) advances a 3-bit phase counter
// `ph`; clock ck_k is high in the four chip slots ph = k, k+1, k+2, k+3
// (mod 8). `rise[k]` is high for the single slot ph == k, so a register
// enabled by rise[k] loads at the clock edge that closes slot k; this is how
// the rest of the design models an element clocked by ck_k.
//
// Timing: ph counts 0..7 from reset; ck and rise are decoded from ph
// combinationally. The phase counter itself is this design's digital
// equivalent of the ring oscillator; frequency locking (the PLL) is outside.
module cdma_ring_phases (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] ph,     // current chip slot within the symbol
  output logic [7:0] ck,     // level of ck0..ck7 during this slot
  output logic [7:0] rise    // rise[k]: this slot is slot k
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 3'd0;
    else        ph <= ph + 3'd1;
  end

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [2:0] d;
      d       = ph - 3'(k);
      ck[k]   = (d < 3'd4);
      rise[k] = (d == 3'd0);
    end
  end

endmodule
