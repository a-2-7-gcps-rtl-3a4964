// tb_cdma_transmitter - sends random words and checks every chip on the
// line: chip i of the symbol that starts 16 chips after a word is taken must
// be the sum over the eight code slots of (+/-1 for the slot's bit) times
// chip i of the slot's Walsh code. After a code-register write (slot 1 moved
// to code "h" and slot 7 to code "b") the new codes must be used.
module tb_cdma_transmitter;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, take, code_we, sym_start;
  logic [6:0] tx_data;
  logic [2:0] code_waddr;
  code_t code_wdata;
  logic signed [4:0] line;
  int checks = 0, failures = 0, rate_checks = 0;
  logic [6:0] sent [int];
  int slot_code [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
  int last_take = -1;

  cdma_transmitter dut (.*);

  function automatic int expect_line(input logic [6:0] w, input int i);
    automatic int s = 0;
    for (int slot = 0; slot < 8; slot++) begin
      automatic int ch = (slot == 4) ? 2 : (slot < 4 ? slot : slot - 1);
      s += (w[ch] ? 1 : -1) * WALSH[slot_code[slot]][i];
    end
    return s;
  endfunction

  initial begin
    rst_n = 0; tx_data = 0; code_we = 0; code_waddr = 0; code_wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1600; t++) begin
      if (t == 800) begin
        code_we = 1; code_waddr = 1;
        for (int n = 0; n < 8; n++) code_wdata[n] = code_bit(7, n);
      end else if (t == 801) begin
        code_waddr = 7;
        for (int n = 0; n < 8; n++) code_wdata[n] = code_bit(1, n);
      end else code_we = 0;
      if (t == 900) begin slot_code[1] = 7; slot_code[7] = 1; end
      #0;
      if (take) begin
        sent[t] = tx_data;
        if (last_take >= 0) begin
          rate_checks++; checks++;
          if (t - last_take != 8) begin failures++; $display("FAIL take spacing %0d", t - last_take); end
        end
        last_take = t;
      end
      // Symbol starting at t - i: word taken at t - i - 16.
      for (int i = 0; i < 8; i++) begin
        automatic int c = t - i - 16;
        if (sent.exists(c) && (t < 800 || c > 900)) begin
          checks++;
          if (int'(line) != expect_line(sent[c], i) || sym_start !== (i == 0)) begin
            failures++;
            $display("FAIL t=%0d chip %0d: line %0d expected %0d", t, i, line, expect_line(sent[c], i));
          end
        end
      end
      @(negedge clk);
      if (take) tx_data = 7'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
