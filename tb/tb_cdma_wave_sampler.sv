// tb_cdma_wave_sampler - feeds a chip stream whose values are the chip
// numbers and checks the three-rank timing: the eight chips of a symbol
// appear together on the outputs at the end of slot 0 two symbols later and
// stay there for the whole symbol.
module tb_cdma_wave_sampler;
  localparam int SW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n;
  logic [7:0] rise;
  logic signed [SW-1:0] in;
  logic signed [SW-1:0] out [8];
  int checks = 0, failures = 0;

  cdma_wave_sampler #(.SW(SW)) dut (.*);

  initial begin
    rst_n = 0; rise = 0; in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int slot = t % 8;
      rise = 8'(1) << slot;
      in   = SW'(t % 120);
      #0;
      // During slot `slot` of symbol m = t/8 the outputs hold symbol m-2,
      // except in slot 0, where they still hold symbol m-3.
      begin
        automatic int m = t / 8 - (slot == 0 ? 3 : 2);
        if (m >= 0)
          for (int i = 0; i < 8; i++) begin
            checks++;
            if (out[i] !== SW'((8 * m + i) % 120)) begin
              failures++;
              $display("FAIL t=%0d out[%0d]=%0d expected chip %0d", t, i, out[i], 8 * m + i);
            end
          end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
