// tb_cdma_chip_sync - the chip synchronizer in a loop with a model of
// sampling: the samples it sees are taken (dly - target)/OVS chip away from
// the chip instants of a band-limited random seven-channel stream. While
// CntSW is in code synchronization the delay code must stay at OVS; once
// released it must settle within two steps of the target, stepping later for
// a target above the current code and earlier for one below. The target is
// then moved across the whole delay range, less than a chip at a time;
// every step must go towards the
// target when the error is three steps or more (after the loop filter has
// had 16 symbols to forget the previous target), and once settled the delay
// code must stay within three steps (3/8 chip) of the target on every
// symbol: with seven channels of random data the discriminator is noisy near
// zero error, and the loop wanders by one to three steps around the chip
// centre.
module tb_cdma_chip_sync;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  localparam int OVS = 8, SW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, sym_en, step_late, step_early;
  logic signed [SW-1:0] samples [8];
  sync_phase_e cnt_sw;
  logic [3:0] dly;
  int checks = 0, failures = 0;
  int n_late = 0, n_early = 0;
  logic [6:0] words [$];
  int sym = 0;

  cdma_chip_sync #(.OVS(OVS), .SW(SW), .AMP(8), .LF_LOG2(3)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && step_late) n_late++;
    if (rst_n && step_early) n_early++;
  end

  function automatic int chip(input int k);
    while (words.size() <= k / 8) words.push_back(7'($urandom));
    return line_chip(words[k / 8], k % 8);
  endfunction

  // Linear interpolation between chips, one chip = OVS sub-steps, amplitude 8.
  function automatic int sample(input int tsub);
    automatic int m = tsub / OVS, f = tsub % OVS;
    return (OVS - f) * chip(m) + f * chip(m + 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // n symbols with the chip instants at delay code `target`. With `track`
  // set, every symbol is a check that the delay stays within three steps.
  int fresh = 0;   // symbols left in which the loop filter may still hold an old error

  task automatic symbols(input int n, input int target, input bit track = 0);
    repeat (n) begin
      automatic int e = int'(dly) - target;
      automatic int prev_dly = int'(dly);
      for (int k = 0; k < 8; k++) samples[k] = SW'(sample((8 * (sym + 4) + k) * OVS + e));
      sym_en = 1; @(negedge clk); sym_en = 0; @(negedge clk);
      sym++;
      if (fresh > 0) fresh--;
      if (cnt_sw == PHASE_CHIP_SYNC && int'(dly) != prev_dly)
        check((int'(dly) > prev_dly) == (e < 0) || (e > -3 && e < 3) || fresh > 0,
              $sformatf("step from %0d away from target %0d", prev_dly, target));
      if (track)
        check(int'(dly) >= target - 3 && int'(dly) <= target + 3,
              $sformatf("delay %0d left target %0d", dly, target));
    end
  endtask

  // Move the target and let the loop settle, then track for 100 symbols.
  task automatic move_to(input int target);
    automatic int span = int'(dly) > target ? int'(dly) - target : target - int'(dly);
    fresh = 16;
    symbols(150 * span + 100, target);
    $display("target %0d: dly=%0d", target, dly);
    symbols(100, target, 1);
  endtask

  initial begin
    rst_n = 0; sym_en = 0; cnt_sw = PHASE_CODE_SYNC;
    for (int k = 0; k < 8; k++) samples[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    symbols(100, 12);
    check(dly == 4'(OVS), "delay moved during code synchronization");
    check(n_late == 0 && n_early == 0, "steps during code synchronization");
    cnt_sw = PHASE_CHIP_SYNC;
    symbols(400, 12);
    $display("target 12: dly=%0d late=%0d early=%0d", dly, n_late, n_early);
    check(dly >= 10 && dly <= 14, "did not settle at target 12");
    check(n_late - n_early >= 2, "too few late steps towards target 12");
    n_late = 0; n_early = 0;
    symbols(500, 5);
    $display("target 5: dly=%0d late=%0d early=%0d", dly, n_late, n_early);
    check(dly >= 3 && dly <= 7, "did not settle at target 5");
    check(n_early - n_late >= 3, "too few early steps towards target 5");
    // Each move is less than one chip: the discriminator's pull-in range.
    move_to(11);
    move_to(14);
    move_to(9);
    move_to(3);
    move_to(1);
    move_to(7);
    cnt_sw = PHASE_CODE_SYNC;
    symbols(2, 5);
    check(dly == 4'(OVS), "delay not reset to its constant on return to code synchronization");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
