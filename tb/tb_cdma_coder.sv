// tb_cdma_coder - checks that each code slot's chip stream carries its
// channel's bit spread by its Walsh code (+code for 1, -code for 0), with
// slot 4 repeating channel 2, 12 chips after the encoders capture the word.
module tb_cdma_coder;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, ck4_rise, ck0_rise;
  logic [7:0] ck;
  logic [6:0] data;
  code_t [0:7] codes;
  logic [7:0] chips;
  int checks = 0, failures = 0;
  logic [6:0] cap [int];

  cdma_coder dut (.*);

  initial begin
    rst_n = 0; ck4_rise = 0; ck0_rise = 0; data = 0; ck = 8'b1110_0001;  // slot 0
    for (int s = 0; s < 8; s++)
      for (int n = 0; n < 8; n++) codes[s][n] = code_bit(s, n);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      automatic int slot = t % 8;
      ck4_rise = (slot == 4);
      ck0_rise = (slot == 0);
      for (int k = 0; k < 8; k++) ck[k] = ((slot - k + 8) % 8) < 4;
      if (slot == 1) data = 7'($urandom);
      if (slot == 4) cap[t] = data;
      #0;
      begin
        automatic int c = t - slot - 12;
        if (cap.exists(c)) begin
          for (int s = 0; s < 8; s++) begin
            automatic int ch = (s == 4) ? 2 : (s < 4 ? s : s - 1);
            logic exp_chip;
            exp_chip = ((cap[c][ch] ? 1 : -1) * WALSH[s][slot]) > 0;
            checks++;
            if (chips[s] !== exp_chip) begin
              failures++;
              $display("FAIL t=%0d slot %0d code slot %0d", t, slot, s);
            end
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
