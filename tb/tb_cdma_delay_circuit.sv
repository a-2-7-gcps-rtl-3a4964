// tb_cdma_delay_circuit - feeds sub-chip samples that encode their own time
// stamp and checks that delay code d returns the sample taken at
// (chip - 1) + d/OVS, for every d.
module tb_cdma_delay_circuit;
  localparam int OVS = 8, SW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n;
  logic signed [SW-1:0] rx_sub [OVS];
  logic [3:0] dly;
  logic signed [SW-1:0] y;
  int checks = 0, failures = 0;

  cdma_delay_circuit #(.OVS(OVS), .SW(SW)) dut (.*);

  // Sample at sub-time s carries s mod 128 (time stamp).
  function automatic logic signed [SW-1:0] stamp(input int s);
    return SW'(s % 100);
  endfunction

  initial begin
    rst_n = 0; dly = 0;
    for (int j = 0; j < OVS; j++) rx_sub[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int j = 0; j < OVS; j++) rx_sub[j] = stamp(n * OVS + j);
      dly = 4'($urandom);
      #0;
      if (n > 0) begin
        checks++;
        if (y !== stamp((n - 1) * OVS + int'(dly))) begin
          failures++;
          $display("FAIL n=%0d dly=%0d y=%0d", n, dly, y);
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
