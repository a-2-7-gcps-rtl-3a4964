// cdma_decoder - recovers one channel's data bit per symbol.
//
// A correlator with the channel's code followed by a clocked comparator: the
// comparator decides whether the correlation is positive (bit 1) or not
// (bit 0) and holds the decision until the next symbol strobe `en`.
//
// Timing: `bit_out` changes at the clock edge where en is high, from the
// samples present in that cycle. A correlation of exactly zero, which an
// aligned symbol never produces, decodes as 0; that tie rule is this
// design's choice.
module cdma_decoder
  import cdma_pkg::*;
#(
  parameter int unsigned SW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [SW-1:0]  samples [8],
  input  code_t                 code,
  output logic                  bit_out
);

  logic signed [SW+3:0] corr;

  cdma_correlator #(.SW(SW)) u_corr (.samples, .code, .corr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  bit_out <= 1'b0;
    else if (en) bit_out <= (corr > 0);
  end

endmodule
