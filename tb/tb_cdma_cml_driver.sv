// tb_cdma_cml_driver - checks the line amplitude for all 256 chip patterns:
// (number of +1 chips) - (number of -1 chips).
module tb_cdma_cml_driver;
  logic [7:0] chips;
  logic signed [4:0] line;
  int checks = 0, failures = 0;

  cdma_cml_driver dut (.*);

  initial begin
    for (int p = 0; p < 256; p++) begin
      automatic int ones = 0;
      chips = 8'(p);
      for (int i = 0; i < 8; i++) ones += p[i];
      #1;
      checks++;
      if (int'(line) != 2 * ones - 8) begin
        failures++;
        $display("FAIL %b -> %0d", chips, line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
