// cdma_encoder - spreads one data bit with one 8-chip code.
//
// Two half-symbol register banks, as in the transmitter's encoder: an input
// flip-flop clocked by ck4 takes the data bit, and a second flip-flop clocked
// by ck0 takes it from the first. Chips 0..3 are encoded as (bit XOR code
// bit) by four flip-flops on ck4 from the first stage; chips 4..7 likewise by
// four flip-flops on ck0 from the second stage. Each half therefore stays
// stable for a whole symbol around the four slots in which the buffer MUX
// reads it.
//
// Timing: a bit present at data_in when ck4_rise is high appears on enc[0:3]
// 8 chips later and on enc[4:7] 12 chips later; the buffer MUX then sends it
// in slots 0..7 of the symbol starting 12 chips after the capture.
// enc holds (data XOR code); the inverting buffer MUX restores the polarity,
// so a data 1 is sent as +code and a data 0 as -code.
module cdma_encoder
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ck4_rise,   // slot 4 ends (rising edge of ck4)
  input  logic        ck0_rise,   // slot 0 ends (rising edge of ck0)
  input  logic        data_in,
  input  code_t       code,
  output code_t       enc
);

  logic d_ck4, d_ck0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_ck4 <= 1'b0;
      d_ck0 <= 1'b0;
      enc   <= '0;
    end else begin
      if (ck4_rise) begin
        d_ck4 <= data_in;
        for (int n = 0; n < 4; n++) enc[n] <= d_ck4 ^ code[n];
      end
      if (ck0_rise) begin
        d_ck0 <= d_ck4;
        for (int n = 4; n < 8; n++) enc[n] <= d_ck0 ^ code[n];
      end
    end
  end

endmodule
