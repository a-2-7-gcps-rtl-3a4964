// tb_cdma_encoder - checks the encoder's timing contract: a bit captured at
// the end of slot 4 must be readable as (bit XOR code chip i) on enc[i]
// during slot i of the symbol starting 12 chips later, for all i.
module tb_cdma_encoder;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, ck4_rise, ck0_rise, data_in;
  code_t code, enc;
  int checks = 0, failures = 0;
  logic cap [int];   // bit captured at the end of cycle t

  cdma_encoder dut (.*);

  initial begin
    rst_n = 0; ck4_rise = 0; ck0_rise = 0; data_in = 0;
    for (int n = 0; n < 8; n++) code[n] = code_bit(6, n);   // code "g"
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int slot = t % 8;
      ck4_rise = (slot == 4);
      ck0_rise = (slot == 0);
      data_in  = 1'($urandom);
      if (slot == 4) cap[t] = data_in;
      begin
        automatic int c = t - slot - 12;
        if (cap.exists(c)) begin
          checks++;
          if (enc[slot] !== (cap[c] ^ code[slot])) begin
            failures++;
            $display("FAIL t=%0d slot %0d: enc %b bit %b", t, slot, enc, cap[c]);
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
