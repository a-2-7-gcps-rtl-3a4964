// tb_cdma_decoder - symbols of seven random channels (one code's chip = 8)
// are presented to a decoder for each channel's code; the decoded bit must
// be the channel's bit, and it may only change at the strobe.
module tb_cdma_decoder;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  localparam int SW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, en, bit_out;
  logic signed [SW-1:0] samples [8];
  code_t code;
  int checks = 0, failures = 0;

  cdma_decoder #(.SW(SW)) dut (.*);

  initial begin
    rst_n = 0; en = 0; code = '0;
    for (int n = 0; n < 8; n++) samples[n] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (300) begin
      automatic logic [6:0] w = 7'($urandom);
      automatic int ch = $urandom_range(6);
      logic prev;
      for (int n = 0; n < 8; n++) samples[n] = SW'(8 * line_chip(w, n));
      for (int n = 0; n < 8; n++) code[n] = code_bit(SLOT_OF_CH[ch], n);
      // Without the strobe the output must hold.
      prev = bit_out;
      @(negedge clk);
      checks++;
      if (bit_out !== prev) begin failures++; $display("FAIL output changed without strobe"); end
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (bit_out !== w[ch]) begin
        failures++;
        $display("FAIL word %b channel %0d decoded %b", w, ch, bit_out);
      end
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
