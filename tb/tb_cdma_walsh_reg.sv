// tb_cdma_walsh_reg - checks that reset loads the Walsh codes a..h and that
// a write replaces exactly one slot at the next clock edge.
module tb_cdma_walsh_reg;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, we;
  logic [2:0] waddr;
  code_t wdata;
  code_t [0:7] codes;
  int checks = 0, failures = 0;
  int expect_code [8];

  cdma_walsh_reg dut (.*);

  task automatic compare(input string tag);
    for (int s = 0; s < 8; s++)
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (codes[s][n] !== code_bit(expect_code[s], n)) begin
          failures++;
          $display("FAIL %s slot %0d chip %0d", tag, s, n);
        end
      end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = '0;
    for (int s = 0; s < 8; s++) expect_code[s] = s;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare("reset");
    // Move slot 3 to code "h" and slot 7 to code "d".
    @(negedge clk);
    we = 1; waddr = 3;
    for (int n = 0; n < 8; n++) wdata[n] = code_bit(7, n);
    @(negedge clk);
    waddr = 7;
    for (int n = 0; n < 8; n++) wdata[n] = code_bit(3, n);
    @(negedge clk) we = 0;
    expect_code[3] = 7; expect_code[7] = 3;
    compare("after writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
