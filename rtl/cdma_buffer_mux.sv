// cdma_buffer_mux - time-shares the eight encoded chips of one code onto one
// line.
//
// Branch i of the MUX is a stack of two clock transistors, ck_i and
// ck_(i+5 mod 8), over the transistor driven by encoded chip i. Because each
// clock is high for four of the eight slots, the two clocks overlap in slot i
// only, so branch i conducts during slot i and pulls the output low when the
// encoded chip is high: the output is the inverse of enc[i] in slot i.
//
// Purely combinational; `chip` is the level in the current slot (1 = +1).
// The clock pairs are those of the transmitter's buffer MUX; the assertion
// checks that exactly one branch is selected in every slot.
module cdma_buffer_mux
  import cdma_pkg::*;
(
  input  logic [7:0] ck,
  input  code_t      enc,
  output logic       chip
);

  logic [7:0] sel;

  always_comb begin
    chip = 1'b0;
    for (int i = 0; i < 8; i++) begin
      sel[i] = ck[i] & ck[(i + 5) % 8];
      chip   = chip | (sel[i] & ~enc[i]);
    end
  end

  // Exactly one branch conducts in every slot.
  always_comb begin
    assert (sel != 8'h00 && (sel & (sel - 8'h01)) == 8'h00)
      else $error("buffer MUX: branches %b selected", sel);
  end

endmodule
