// cdma_transmitter - CDMA serial transmitter: seven data channels spread by
// eight Walsh codes and summed onto one line.
//
// The ring-oscillator phases (cdma_ring_phases) clock the data buffer, the
// encoders and the time-sharing buffer MUXes; the CML driver adds the eight
// chip streams. Every 8 chips the transmitter takes one 7-bit word (`take`
// high marks the slot whose closing edge latches tx_data) and sends it as one
// symbol of eight multilevel chips on `line`, in units of one code's swing.
// The code register can be rewritten at run time through code_we/addr/wdata.
//
// Timing: one chip per clock. A word latched at the end of a slot-0 cycle is
// on the line in the 8 cycles that begin 16 cycles later (sym_start high in
// the first of them). The chip rate in the document is 2.7 Gchip/s, so one
// symbol lasts 8 chips at 338 MHz.
module cdma_transmitter
  import cdma_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_CH-1:0]       tx_data,
  output logic                  take,
  input  logic                  code_we,
  input  logic [2:0]            code_waddr,
  input  code_t                 code_wdata,
  output logic signed [4:0]     line,
  output logic                  sym_start   // line carries chip 0 of a symbol
);

  logic [2:0]          ph;
  logic [7:0]          ck, rise;
  logic [N_CH-1:0]     data_q;
  code_t [0:N_CODES-1] codes;
  logic [N_CODES-1:0]  chips;

  cdma_ring_phases u_ring (.clk, .rst_n, .ph, .ck, .rise);

  cdma_walsh_reg u_codes (
    .clk, .rst_n, .we(code_we), .waddr(code_waddr), .wdata(code_wdata), .codes
  );

  assign take = rise[0];

  cdma_data_buffer u_buf (
    .clk, .rst_n, .ck0_rise(rise[0]), .data_in(tx_data), .data_out(data_q)
  );

  cdma_coder u_coder (
    .clk, .rst_n, .ck, .ck4_rise(rise[4]), .ck0_rise(rise[0]), .data(data_q), .codes, .chips
  );

  cdma_cml_driver u_cml (.chips, .line);

  assign sym_start = (ph == 3'd0);

endmodule
