// tb_cdma_buffer_mux - for every slot and random encoded words, the MUX must
// output the inverse of the encoded chip of that slot.
module tb_cdma_buffer_mux;
  import cdma_pkg::*;
  logic [7:0] ck;
  code_t enc;
  logic chip;
  int checks = 0, failures = 0;

  cdma_buffer_mux dut (.*);

  initial begin
    repeat (50) begin
      enc = code_t'($urandom);
      for (int slot = 0; slot < 8; slot++) begin
        for (int k = 0; k < 8; k++) ck[k] = ((slot - k + 8) % 8) < 4;
        #1;
        checks++;
        if (chip !== ~enc[slot]) begin
          failures++;
          $display("FAIL slot %0d enc %b chip %b", slot, enc, chip);
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
