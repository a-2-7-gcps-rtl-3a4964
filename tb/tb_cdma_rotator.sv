// tb_cdma_rotator - for every rotation and every slot, sampler clock i must
// be ring clock (i + rot) mod 8.
module tb_cdma_rotator;
  logic [7:0] clk_in, clk_out;
  logic [2:0] rot;
  int checks = 0, failures = 0;

  cdma_rotator dut (.*);

  initial begin
    for (int r = 0; r < 8; r++)
      for (int slot = 0; slot < 8; slot++) begin
        rot = 3'(r);
        for (int k = 0; k < 8; k++) clk_in[k] = ((slot - k + 8) % 8) < 4;
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          // Sampler clock i is high in slots i+r .. i+r+3.
          if (clk_out[i] !== (((slot - i - r + 16) % 8) < 4)) begin
            failures++;
            $display("FAIL rot %0d slot %0d clock %0d", r, slot, i);
          end
        end
      end
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
