// tb_cdma_gilbert_cell - signed products over random and corner operands.
module tb_cdma_gilbert_cell;
  localparam int W = 11;
  logic signed [W-1:0] a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  cdma_gilbert_cell #(.W(W)) dut (.*);

  task automatic try(input int x, input int y);
    a = W'(x); b = W'(y);
    #1;
    checks++;
    if (int'(p) != x * y) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", x, y, p);
    end
  endtask

  initial begin
    try(-1024, -1024); try(-1024, 1023); try(1023, 1023); try(0, -5);
    repeat (300) try($urandom_range(2047) - 1024, $urandom_range(2047) - 1024);
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
