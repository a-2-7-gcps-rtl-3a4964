// cdma_line_model - behavioural model of the serial line between the
// transmitter and the receiver (testbench only, not synthesizable).
//
// Takes the transmitter's line amplitude once per chip clock and delivers it
// to the receiver as OVS sub-chip samples per chip clock. The line delays
// the signal by `dsub` sub-chip steps (at least 2*OVS, two chips) and
// band-limits it: between two chip instants the waveform moves linearly from
// one chip's level to the next, so a sample taken a fraction f of a chip
// after chip m reads (1-f)*x[m] + f*x[m+1]. One code's +1 chip becomes AMP.
module cdma_line_model #(
  parameter int unsigned OVS   = 8,
  parameter int unsigned SW    = 8,
  parameter int unsigned AMP   = 8,
  parameter int unsigned DEPTH = 16        // longest delay, in chips
) (
  input  logic                  clk,
  input  logic signed [4:0]     tx_line,
  input  int unsigned           dsub,      // delay in 1/OVS chip steps
  output logic signed [SW-1:0]  rx_sub [OVS]
);

  // hist[k] is the line amplitude k+1 chip clocks ago.
  int hist [DEPTH+2];

  initial for (int k = 0; k < DEPTH + 2; k++) hist[k] = 0;

  always @(posedge clk) begin
    for (int k = DEPTH + 1; k > 0; k--) hist[k] <= hist[k-1];
    hist[0] <= int'(tx_line);
  end

  always_comb begin
    for (int j = 0; j < OVS; j++) begin
      int r, back, f, v;
      // Sample instant relative to the current chip clock, in sub-steps;
      // always negative because dsub >= 2*OVS.
      r    = j - int'(dsub) + int'(OVS);
      back = (-r + int'(OVS) - 1) / int'(OVS);   // chips back: ceil(-r/OVS)
      f    = r + back * int'(OVS);               // 0 .. OVS-1
      v    = (int'(OVS) - f) * hist[back] + f * hist[back > 0 ? back - 1 : 0];
      rx_sub[j] = SW'(v * int'(AMP) / int'(OVS));
    end
  end

endmodule
