// cdma_data_buffer - transmit data buffer.
//
// Latches the seven channel bits once per symbol, at the edge that closes
// slot 0 (clock ck0), and holds them for the CDMA coder. A source presents
// a new word every 8 chips and may change it right after that edge.
//
// Timing: one 7-bit word per 8 chip clocks; data_out changes right after
// the edge that ends a slot with ck0_rise high. Reset clears the buffer. The document shows
// the buffer and its two clock lines only as a box; latching on ck0 is this
// design's choice.
module cdma_data_buffer
  import cdma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ck0_rise,
  input  logic [N_CH-1:0]   data_in,
  output logic [N_CH-1:0]   data_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       data_out <= '0;
    else if (ck0_rise) data_out <= data_in;
  end

endmodule
