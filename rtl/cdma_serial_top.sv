// cdma_serial_top - the transceiver test chip: a CDMA serial transmitter and
// a CDMA serial receiver side by side.
//
// Seven data channels are spread with length-8 Walsh codes and summed onto
// one multilevel serial line by the transmitter; the receiver synchronizes to
// that line in two steps (symbol boundary, then sub-chip sampling phase) and
// recovers the seven channels. Transmitter and receiver share the chip-rate
// clock but have their own resets and their own ring-oscillator phase; the
// line between them is outside the chip: `tx_line` is the transmitter's
// amplitude per chip (units of one code), `rx_sub` the receiver's input as
// OVS sub-chip samples per chip (one code's +1 chip = AMP).
//
// Each side has its own code-register write port, so codes can be
// re-assigned on both ends at run time.
module cdma_serial_top
  import cdma_pkg::*;
#(
  parameter int unsigned OVS      = 8,
  parameter int unsigned SW       = 8,
  parameter int unsigned AMP      = 8,
  parameter int unsigned AVG_LOG2 = 6,
  parameter int unsigned THR_Q8   = 115,
  parameter int unsigned SETTLE   = 3,
  parameter int unsigned LF_LOG2  = 3,
  localparam int unsigned DW      = $clog2(2 * OVS)
) (
  input  logic                  clk,
  // transmitter
  input  logic                  tx_rst_n,
  input  logic [N_CH-1:0]       tx_data,
  output logic                  tx_take,
  input  logic                  tx_code_we,
  input  logic [2:0]            tx_code_waddr,
  input  code_t                 tx_code_wdata,
  output logic signed [4:0]     tx_line,
  output logic                  tx_sym_start,
  // receiver
  input  logic                  rx_rst_n,
  input  logic signed [SW-1:0]  rx_sub [OVS],
  input  logic                  rx_code_we,
  input  logic [2:0]            rx_code_waddr,
  input  code_t                 rx_code_wdata,
  input  logic                  rx_resync,
  output logic [N_CH-1:0]       rx_data,
  output logic                  rx_valid,
  output sync_phase_e           rx_cnt_sw,
  output logic [2:0]            rx_cnt_mux,
  output logic [DW-1:0]         rx_dly,
  output logic                  rx_rot_step,
  output logic                  rx_code_locked,
  output logic                  rx_step_late,
  output logic                  rx_step_early
);

  cdma_transmitter u_tx (
    .clk, .rst_n(tx_rst_n), .tx_data, .take(tx_take),
    .code_we(tx_code_we), .code_waddr(tx_code_waddr), .code_wdata(tx_code_wdata),
    .line(tx_line), .sym_start(tx_sym_start)
  );

  cdma_receiver #(
    .OVS(OVS), .SW(SW), .AMP(AMP), .AVG_LOG2(AVG_LOG2), .THR_Q8(THR_Q8),
    .SETTLE(SETTLE), .LF_LOG2(LF_LOG2)
  ) u_rx (
    .clk, .rst_n(rx_rst_n), .rx_sub,
    .code_we(rx_code_we), .code_waddr(rx_code_waddr), .code_wdata(rx_code_wdata),
    .resync(rx_resync), .rx_data, .rx_valid,
    .cnt_sw(rx_cnt_sw), .cnt_mux(rx_cnt_mux), .dly(rx_dly),
    .rot_step(rx_rot_step), .code_locked(rx_code_locked),
    .step_late(rx_step_late), .step_early(rx_step_early)
  );

endmodule
