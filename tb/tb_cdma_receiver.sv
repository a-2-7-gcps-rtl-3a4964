// tb_cdma_receiver - the receiver alone, fed by a line model driven with a
// chip stream computed in the testbench from random words (no transmitter
// RTL involved). The line is 4 chips and 5/8 chip late. The receiver must
// complete code synchronization, settle its delay on the chip instants,
// deliver one word every 8 chips, and decode every word correctly at a
// constant latency.
module tb_cdma_receiver;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  localparam int OVS = 8, SW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, code_we, resync;
  logic [2:0] code_waddr;
  code_t code_wdata;
  logic signed [SW-1:0] rx_sub [OVS];
  logic [6:0] rx_data;
  logic rx_valid, rot_step, code_locked, step_late, step_early;
  sync_phase_e cnt_sw;
  logic [2:0] cnt_mux;
  logic [3:0] dly;
  logic signed [4:0] tx_line;
  int unsigned dsub = 4 * OVS + 5;
  int checks = 0, failures = 0;
  logic [6:0] sent [$];
  logic [6:0] rcvd [$];
  int t = 0, last_valid = -1, n_rot = 0;

  cdma_receiver #(.OVS(OVS), .SW(SW)) dut (.*);
  cdma_line_model #(.OVS(OVS), .SW(SW), .AMP(8), .DEPTH(16)) u_line (.clk, .tx_line, .dsub, .rx_sub);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Chip stream: word k on chips 8k..8k+7.
  always @(negedge clk) begin
    if (t % 8 == 0) sent.push_back(7'($urandom));
    tx_line <= 5'(line_chip(sent[t / 8], t % 8));
    t++;
  end

  always @(posedge clk) begin
    if (rst_n && rot_step) n_rot++;
    if (rx_valid) begin
      rcvd.push_back(rx_data);
      if (cnt_sw == PHASE_CHIP_SYNC && last_valid >= 0) begin
        checks++;
        if (t - last_valid != 8) begin failures++; $display("FAIL rx_valid spacing %0d", t - last_valid); end
      end
      last_valid = t;
    end
  end

  initial begin
    automatic int rel = -1;
    rst_n = 0; code_we = 0; code_waddr = 0; code_wdata = 0; resync = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (cnt_sw == PHASE_CHIP_SYNC);
    repeat (8 * 300) @(posedge clk);
    check(n_rot > 0, "no clock rotation");
    check((int'(dly) - int'(dsub % OVS) + OVS + 2) % OVS <= 4, "delay not within two steps of the chip instants");
    // Find the latency from the last 32 words.
    for (int L = 0; L < 20 && rel < 0; L++) begin
      automatic bit ok = 1;
      for (int k = 1; k <= 32; k++)
        if (rcvd[rcvd.size() - k] != sent[rcvd.size() - k - L]) ok = 0;
      if (ok) rel = L;
    end
    check(rel >= 0, "no constant latency found");
    $display("locked: rot=%0d dly=%0d rotations=%0d latency=%0d symbols", cnt_mux, dly, n_rot, rel);
    begin
      automatic int base = rcvd.size(), errs = 0;
      repeat (8 * 500) @(posedge clk);
      for (int i = base; i < base + 500; i++) begin
        checks++;
        if (rel < 0 || rcvd[i] != sent[i - rel]) errs++;
      end
      failures += errs;
      $display("500 words checked, %0d wrong", errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
