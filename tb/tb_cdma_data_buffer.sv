// tb_cdma_data_buffer - checks that the buffer takes the data word only at
// the end of slot 0 and holds it for the rest of the symbol.
module tb_cdma_data_buffer;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, ck0_rise;
  logic [6:0] data_in, data_out, held;
  int checks = 0, failures = 0;

  cdma_data_buffer dut (.*);

  initial begin
    rst_n = 0; ck0_rise = 0; data_in = 0; held = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      ck0_rise = (c % 8 == 0);
      data_in  = 7'($urandom);
      #0;
      @(negedge clk);
      if (c % 8 == 0) held = data_in;
      checks++;
      if (data_out !== held) begin
        failures++;
        $display("FAIL cycle %0d: out %h expected %h", c, data_out, held);
      end
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
