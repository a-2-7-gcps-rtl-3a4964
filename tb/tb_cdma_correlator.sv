// tb_cdma_correlator - random samples against every Walsh code: the output
// must be the sum of sample times +/-1 code chip.
module tb_cdma_correlator;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  localparam int SW = 8;
  logic signed [SW-1:0] samples [8];
  code_t code;
  logic signed [SW+3:0] corr;
  int checks = 0, failures = 0;

  cdma_correlator #(.SW(SW)) dut (.*);

  initial begin
    repeat (300) begin
      automatic int c = $urandom_range(7);
      automatic int acc = 0;
      for (int n = 0; n < 8; n++) begin
        samples[n] = SW'($urandom_range(255));
        code[n] = code_bit(c, n);
        acc += int'(samples[n]) * WALSH[c][n];
      end
      #1;
      checks++;
      if (int'(corr) != acc) begin
        failures++;
        $display("FAIL code %0d: %0d expected %0d", c, corr, acc);
      end
    end
    // Extremes: all samples at the most negative value.
    for (int n = 0; n < 8; n++) begin samples[n] = -128; code[n] = 1'b0; end
    #1;
    checks++;
    if (int'(corr) != 1024) begin failures++; $display("FAIL extreme %0d", corr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
