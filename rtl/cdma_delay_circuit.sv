// cdma_delay_circuit - voltage-controlled delay of the sampler clocks,
// modelled as a fractional-chip sample selector.
//
// In the chip, eight delay circuits delay the eight rotated sampler clocks by
// an amount set by the differential control voltage Cnt+/Cnt-. Here the line
// arrives as OVS sub-chip samples per chip clock (rx_sub[j] is the line at
// time n + j/OVS during chip clock n). The circuit keeps the previous chip's
// sub-samples, forming a window that spans two chips, and picks one sample:
// the sampling instant is (n - 1) + dly/OVS, so raising `dly` by one delays
// every sampler clock by 1/OVS chip. dly = OVS samples at the start of chip
// slot n; the range covers one chip before that and just under one after.
//
// Timing: `y` is combinational from rx_sub and the stored previous chip.
// The sub-chip sample bus and the digital delay code replacing the analog
// control voltage are this design's choices.
module cdma_delay_circuit #(
  parameter int unsigned OVS = 8,              // sub-samples per chip
  parameter int unsigned SW  = 8,              // sample width (signed)
  localparam int unsigned DW = $clog2(2 * OVS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [SW-1:0]        rx_sub [OVS],
  input  logic [DW-1:0]               dly,
  output logic signed [SW-1:0]        y
);

  logic signed [SW-1:0] prev [OVS];
  logic signed [SW-1:0] win  [2*OVS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int j = 0; j < OVS; j++) prev[j] <= '0;
    else        prev <= rx_sub;
  end

  always_comb begin
    for (int j = 0; j < OVS; j++) begin
      win[j]       = prev[j];
      win[OVS + j] = rx_sub[j];
    end
    y = win[dly];
  end

endmodule
