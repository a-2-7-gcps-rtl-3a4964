// cdma_coder - the CDMA coder of the transmitter: eight encoders, each with
// its buffer MUX.
//
// Code slot s (0..7) spreads one bit with code codes[s] and time-shares the
// eight encoded chips onto its own chip stream chips[s], one chip per slot.
// The seven data channels feed the eight slots through cdma_pkg::slot_to_ch:
// channel 2 drives both slot 2 (code "c") and slot 4 (code "e"), because the
// receiver's synchronizers need those two codes to carry the same bit.
//
// Timing: data latched by the data buffer at the end of slot 0 is captured by
// the encoders at the end of the following slot 4 and sent in slots 0..7 of
// the symbol that starts 16 chips after the data buffer latched it.
module cdma_coder
  import cdma_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            ck,
  input  logic                  ck4_rise,
  input  logic                  ck0_rise,
  input  logic [N_CH-1:0]       data,
  input  code_t [0:N_CODES-1]   codes,
  output logic [N_CODES-1:0]    chips
);

  for (genvar s = 0; s < N_CODES; s++) begin : g_slot
    code_t enc;

    cdma_encoder u_enc (
      .clk     (clk),
      .rst_n   (rst_n),
      .ck4_rise(ck4_rise),
      .ck0_rise(ck0_rise),
      .data_in (data[slot_to_ch(s)]),
      .code    (codes[s]),
      .enc     (enc)
    );

    cdma_buffer_mux u_mux (
      .ck   (ck),
      .enc  (enc),
      .chip (chips[s])
    );
  end

endmodule
