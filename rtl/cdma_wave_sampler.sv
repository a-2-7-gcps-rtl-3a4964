// cdma_wave_sampler - deinterleaves one symbol of line samples into eight
// parallel, phase-aligned samples.
//
// Three ranks of sampler blocks, eight blocks each. Rank A block i samples
// the line with sampler clock ck_i, so it holds chip i of the symbol. Rank B
// resamples A0..A3 on ck0 and A4..A7 on ck4, reducing the eight phases to
// two groups. Rank C resamples all of B on ck0, so all eight outputs change
// together once per symbol. Each sampler block is a master-slave
// sample-and-hold pair and is modelled as a register that loads at the edge
// closing its clock's slot (rise[k]).
//
// Timing: chip k of a symbol is taken at the end of slot k; all eight chips of
// that symbol appear on `out` at the end of slot 0 two symbols (16 chips)
// after chip 0 was taken, and stay for one symbol. The analog held voltage is
// represented by a signed SW-bit amplitude.
module cdma_wave_sampler #(
  parameter int unsigned SW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            rise,      // rotated, delayed sampler clocks
  input  logic signed [SW-1:0]  in,
  output logic signed [SW-1:0]  out [8]
);

  logic signed [SW-1:0] a [8];
  logic signed [SW-1:0] b [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        a[i]   <= '0;
        b[i]   <= '0;
        out[i] <= '0;
      end
    end else begin
      for (int i = 0; i < 8; i++)
        if (rise[i]) a[i] <= in;
      if (rise[0]) begin
        for (int i = 0; i < 4; i++) b[i] <= a[i];
        out <= b;
      end
      if (rise[4])
        for (int i = 4; i < 8; i++) b[i] <= a[i];
    end
  end

endmodule
