// cdma_receiver - CDMA serial receiver with two-step synchronization.
//
// The line arrives as OVS sub-chip samples per chip clock. The delay circuit
// picks one of them per chip (the delayed sampler clock), the wave sampler
// deinterleaves eight chips into one symbol of parallel samples on the
// rotated sampler clocks, and seven decoders correlate that symbol with their
// codes. Synchronization runs in two steps:
//   1. code synchronization (cdma_code_sync) rotates the sampler clocks one
//      chip at a time until the symbol window matches the transmitter's,
//      with the delay held at its initial value;
//   2. chip synchronization (cdma_chip_sync), enabled by CntSW, steers the
//      sampling delay in 1/OVS-chip steps until the samples sit on the chip
//      centres.
// Decoders use the code register (slot of channel ch = cdma_pkg::ch_to_slot),
// which can be rewritten at run time; the synchronizers use fixed copies of
// codes "c" and "e".
//
// Timing: one chip per clock; rx_valid pulses once per symbol, one clock
// after the decoders latch, with the seven bits on rx_data. Samples are
// signed SW-bit values; one code's +1 chip is AMP. Data are valid only
// after cnt_sw is PHASE_CHIP_SYNC and the loop has settled.
module cdma_receiver
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
  input  logic                  rst_n,
  input  logic signed [SW-1:0]  rx_sub [OVS],
  input  logic                  code_we,
  input  logic [2:0]            code_waddr,
  input  code_t                 code_wdata,
  input  logic                  resync,
  output logic [N_CH-1:0]       rx_data,
  output logic                  rx_valid,
  output sync_phase_e           cnt_sw,
  output logic [2:0]            cnt_mux,
  output logic [DW-1:0]         dly,
  output logic                  rot_step,
  output logic                  code_locked,
  output logic                  step_late,
  output logic                  step_early
);

  logic [7:0]            rise, rise_s;
  logic signed [SW-1:0]  y;
  logic signed [SW-1:0]  samples [8];
  code_t [0:N_CODES-1]   codes;
  logic                  sym_en;

  // Only the slot strobes of the ring phases are used by the receiver.
  cdma_ring_phases u_ring (.clk, .rst_n, .ph(), .ck(), .rise);

  cdma_rotator u_rot (.clk_in(rise), .rot(cnt_mux), .clk_out(rise_s));

  cdma_delay_circuit #(.OVS(OVS), .SW(SW)) u_dly (
    .clk, .rst_n, .rx_sub, .dly, .y
  );

  cdma_wave_sampler #(.SW(SW)) u_ws (
    .clk, .rst_n, .rise(rise_s), .in(y), .out(samples)
  );

  // A new symbol is on the sampler outputs during sampler slot 1.
  assign sym_en = rise_s[1];

  cdma_walsh_reg u_codes (
    .clk, .rst_n, .we(code_we), .waddr(code_waddr), .wdata(code_wdata), .codes
  );

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_dec
    cdma_decoder #(.SW(SW)) u_dec (
      .clk, .rst_n, .en(sym_en), .samples,
      .code(codes[ch_to_slot(ch)]), .bit_out(rx_data[ch])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_valid <= 1'b0;
    else        rx_valid <= sym_en;
  end

  cdma_code_sync #(
    .SW(SW), .AMP(AMP), .AVG_LOG2(AVG_LOG2), .THR_Q8(THR_Q8), .SETTLE(SETTLE)
  ) u_code_sync (
    .clk, .rst_n, .sym_en, .samples, .resync,
    .rot(cnt_mux), .cnt_sw, .rot_step, .locked_evt(code_locked)
  );

  cdma_chip_sync #(
    .OVS(OVS), .SW(SW), .AMP(AMP), .LF_LOG2(LF_LOG2)
  ) u_chip_sync (
    .clk, .rst_n, .sym_en, .samples, .cnt_sw, .dly, .step_late, .step_early
  );

endmodule
