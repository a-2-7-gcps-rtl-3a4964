// tb_cdma_ring_phases - checks the eight ring phases: ph counts 0..7, ck_k
// is high in slots k..k+3 (50% duty, one chip apart) and rise[k] only in
// slot k.
module tb_cdma_ring_phases;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n;
  logic [2:0] ph;
  logic [7:0] ck, rise;
  int checks = 0, failures = 0;

  cdma_ring_phases dut (.*);

  initial begin
    int slot;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    slot = 0;
    repeat (40) begin
      for (int k = 0; k < 8; k++) begin
        automatic int d = (slot - k + 8) % 8;
        checks++;
        if (ck[k] !== (d < 4) || rise[k] !== (d == 0) || ph !== 3'(slot)) begin
          failures++;
          $display("FAIL slot %0d k %0d: ph=%0d ck=%b rise=%b", slot, k, ph, ck, rise);
        end
      end
      @(negedge clk);
      slot = (slot + 1) % 8;
    end
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
