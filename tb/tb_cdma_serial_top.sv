// tb_cdma_serial_top - end-to-end test of the transceiver at its default
// parameters: transmitter -> line model -> receiver.
//
// Random 7-bit words are sent every symbol. The line delays the signal by a
// number of chips plus a fraction of a chip, so the receiver has to rotate
// its sampler clocks (code synchronization) and then steer its sampling delay
// (chip synchronization) before it decodes. The test then
//   1. checks that the delay code settles on the chip instants (within the
//      loop's wander of two steps, 1/4 chip),
//   2. finds the symbol latency and checks every decoded word,
//   3. moves the line's fractional delay later and earlier, so the DLL has to
//      step both ways, and checks the data again,
//   4. swaps the codes of channels 0 and 1 on both ends at once (real-time
//      code re-assignment) and checks the data once the symbols in flight
//      have drained,
//   5. forces a re-synchronization and checks the data after relock.
// Each mechanism (clock rotation, code lock, late step, early step, code
// re-assignment, resync) is counted; one that never happens is a failure.
module tb_cdma_serial_top;
  import cdma_pkg::*;

  localparam int unsigned OVS = 8;
  localparam int unsigned SW  = 8;
  localparam int unsigned DW  = $clog2(2 * OVS);

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic                  tx_rst_n, rx_rst_n;
  logic [N_CH-1:0]       tx_data;
  logic                  tx_take, tx_sym_start;
  logic                  tx_code_we, rx_code_we;
  logic [2:0]            tx_code_waddr, rx_code_waddr;
  code_t                 tx_code_wdata, rx_code_wdata;
  logic signed [4:0]     tx_line;
  logic signed [SW-1:0]  rx_sub [OVS];
  logic                  rx_resync;
  logic [N_CH-1:0]       rx_data;
  logic                  rx_valid;
  sync_phase_e           rx_cnt_sw;
  logic [2:0]            rx_cnt_mux;
  logic [DW-1:0]         rx_dly;
  logic                  rx_rot_step, rx_code_locked, rx_step_late, rx_step_early;
  int unsigned           dsub;

  cdma_serial_top dut (.*);

  cdma_line_model #(.OVS(OVS), .SW(SW), .AMP(8), .DEPTH(16)) u_line (
    .clk, .tx_line, .dsub, .rx_sub
  );

  int checks = 0, failures = 0;
  int n_rot = 0, n_lock = 0, n_late = 0, n_early = 0, n_reassign = 0, n_resync = 0;

  // Sent words, one per symbol, and received words, one per rx_valid.
  logic [N_CH-1:0] sent [$];
  logic [N_CH-1:0] rcvd [$];
  int lag;
  int rel;   // received index minus sent index of the same word

  always @(posedge clk) begin
    if (tx_rst_n && tx_take) begin
      sent.push_back(tx_data);
      tx_data <= N_CH'($urandom);
    end
    if (rx_rst_n && rx_valid) rcvd.push_back(rx_data);
    if (rx_rst_n && rx_rot_step)    n_rot++;
    if (rx_rst_n && rx_code_locked) n_lock++;
    if (rx_rst_n && rx_step_late)   n_late++;
    if (rx_rst_n && rx_step_early)  n_early++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic symbols(input int n);
    repeat (8 * n) @(posedge clk);
  endtask

  // Word received k symbols ago matched against the sent word L symbols earlier.
  function automatic bit match_window(input int L, input int span);
    automatic int nr = rcvd.size(), ns = sent.size();
    for (int k = 1; k <= span; k++) begin
      automatic int ir = nr - k, is = ns - k - L;
      if (ir < 0 || is < 0) return 0;
      if (rcvd[ir] != sent[is]) return 0;
    end
    return 1;
  endfunction

  task automatic find_lag();
    lag = -1;
    for (int L = 0; L < 16; L++)
      if (match_window(L, 32)) begin
        lag = L;
        rel = rcvd.size() - sent.size() + L;
        break;
      end
    check(lag >= 0, "no symbol latency matches the last 32 received words");
    $display("symbol latency %0d (sent words still in flight)", lag);
  endtask

  // Check the next n received words against the sent ones.
  task automatic check_words(input int n, input string tag);
    automatic int errs = 0;
    automatic int base = rcvd.size();
    symbols(n + 1);
    for (int i = base; i < base + n; i++) begin
      automatic int is = i - rel;
      checks++;
      if (is < 0 || rcvd[i] != sent[is]) errs++;
    end
    failures += errs;
    $display("%s: %0d words checked, %0d wrong", tag, n, errs);
  endtask

  function automatic bit dly_on_chip(input int unsigned d);
    automatic int t = int'(d % OVS);
    automatic int e = (int'(rx_dly) - t + OVS) % OVS;
    return (e <= 2) || (e >= OVS - 2);
  endfunction

  task automatic wait_lock(input int max_symbols);
    automatic int n = 0;
    while (rx_cnt_sw != PHASE_CHIP_SYNC && n < 8 * max_symbols) begin
      @(posedge clk);
      n++;
    end
    check(rx_cnt_sw == PHASE_CHIP_SYNC, "code synchronization did not complete");
  endtask

  task automatic write_codes(input int unsigned slot, input code_t code);
    @(negedge clk);
    tx_code_we = 1'b1; tx_code_waddr = 3'(slot); tx_code_wdata = code;
    rx_code_we = 1'b1; rx_code_waddr = 3'(slot); rx_code_wdata = code;
    @(negedge clk);
    tx_code_we = 1'b0; rx_code_we = 1'b0;
  endtask

  initial begin
    tx_rst_n = 1'b0; rx_rst_n = 1'b0;
    tx_data = '0; rx_resync = 1'b0;
    tx_code_we = 1'b0; tx_code_waddr = '0; tx_code_wdata = '0;
    rx_code_we = 1'b0; rx_code_waddr = '0; rx_code_wdata = '0;
    dsub = 5 * OVS + 3;          // 5 chips and 3/8 chip
    repeat (5) @(posedge clk);
    @(negedge clk);
    tx_rst_n = 1'b1;
    rx_rst_n = 1'b1;

    // Two-step synchronization.
    wait_lock(8 * 80);
    symbols(300);
    check(dly_on_chip(dsub), $sformatf("delay code %0d not on chip instants (line %0d)", rx_dly, dsub));
    find_lag();
    check_words(400, "after first lock");

    // Line gets later by 3/8 chip: the DLL must add delay.
    dsub = 5 * OVS + 6;
    symbols(300);
    check(dly_on_chip(dsub), $sformatf("delay code %0d not on chip instants (line %0d)", rx_dly, dsub));
    find_lag();
    check_words(300, "after later line");

    // Line gets earlier by 4/8 chip: the DLL must remove delay.
    dsub = 5 * OVS + 2;
    symbols(300);
    check(dly_on_chip(dsub), $sformatf("delay code %0d not on chip instants (line %0d)", rx_dly, dsub));
    find_lag();
    check_words(300, "after earlier line");

    // Real-time code re-assignment on both ends: channels 0 and 1 swap codes.
    write_codes(0, WALSH_B);
    write_codes(1, WALSH_A);
    n_reassign++;
    symbols(40);
    find_lag();
    check_words(300, "after code swap");

    // Re-synchronization from scratch with a new whole-chip delay.
    dsub = 7 * OVS + 5;
    @(negedge clk) rx_resync = 1'b1;
    @(negedge clk) rx_resync = 1'b0;
    n_resync++;
    wait_lock(8 * 80);
    symbols(300);
    check(dly_on_chip(dsub), $sformatf("delay code %0d not on chip instants (line %0d)", rx_dly, dsub));
    find_lag();
    check_words(400, "after resync");

    $display("mechanisms: rotations=%0d locks=%0d late_steps=%0d early_steps=%0d reassign=%0d resync=%0d",
             n_rot, n_lock, n_late, n_early, n_reassign, n_resync);
    check(n_rot > 0,      "clock rotation never happened");
    check(n_lock >= 2,    "code lock did not happen twice");
    check(n_late > 0,     "no late step of the DLL");
    check(n_early > 0,    "no early step of the DLL");
    check(n_reassign > 0, "no code re-assignment");
    check(n_resync > 0,   "no resync");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
