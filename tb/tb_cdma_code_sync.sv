// tb_cdma_code_sync - code synchronization on a stream of seven random
// channels. The testbench cuts the chip stream into symbol windows that
// start `off + rot` chips after the true symbol boundary, where rot is the
// synchronizer's own rotation output. The synchronizer must rotate until
// the window is aligned ((off + rot) mod 8 == 0), then raise CntSW and stop
// rotating. Each decision must take SETTLE + 64 symbols. A resync must
// restart the search; it is tried from each of the eight window offsets.
module tb_cdma_code_sync;
  import cdma_pkg::*;
  import tb_cdma_ref_pkg::*;
  localparam int SW = 8, SETTLE = 3, AVG = 64;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, sym_en, resync, rot_step, locked_evt;
  logic signed [SW-1:0] samples [8];
  logic [2:0] rot;
  sync_phase_e cnt_sw;
  int checks = 0, failures = 0;
  int n_steps = 0;
  logic [6:0] words [$];

  cdma_code_sync #(.SW(SW), .AMP(8), .AVG_LOG2(6), .THR_Q8(115), .SETTLE(SETTLE)) dut (.*);

  always @(posedge clk) if (rst_n && rot_step) n_steps++;

  function automatic int chip(input int k);
    while (words.size() <= k / 8) words.push_back(7'($urandom));
    return line_chip(words[k / 8], k % 8);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Present symbols until lock or `limit` symbols; returns symbols used.
  task automatic run(input int off, input int limit, output int used);
    used = 0;
    while (cnt_sw != PHASE_CHIP_SYNC && used < limit) begin
      automatic int start = 8 * (used + 4) + off + int'(rot);
      for (int n = 0; n < 8; n++) samples[n] = SW'(8 * chip(start + n));
      sym_en = 1;
      @(negedge clk);
      sym_en = 0;
      @(negedge clk);
      used++;
    end
  endtask

  initial begin
    int used;
    rst_n = 0; sym_en = 0; resync = 0;
    for (int n = 0; n < 8; n++) samples[n] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Window starts 3 chips late: needs 5 rotations.
    run(3, 2000, used);
    $display("offset 3: locked=%0d rot=%0d steps=%0d symbols=%0d", cnt_sw, rot, n_steps, used);
    check(cnt_sw == PHASE_CHIP_SYNC, "no lock for offset 3");
    check((3 + rot) % 8 == 0, "locked at wrong rotation for offset 3");
    check(n_steps == 5, "expected 5 rotation steps for offset 3");
    check(used == 6 * (SETTLE + AVG), "decision time for offset 3");
    // Rotation must stay frozen while locked.
    begin
      automatic logic [2:0] r0 = rot;
      for (int k = 0; k < 200; k++) begin
        automatic int start = 8 * (k + 4) + 3 + int'(rot);
        for (int n = 0; n < 8; n++) samples[n] = SW'(8 * chip(start + n));
        sym_en = 1; @(negedge clk); sym_en = 0; @(negedge clk);
      end
      check(rot == r0 && cnt_sw == PHASE_CHIP_SYNC, "rotation moved after lock");
    end
    // Resync from every window offset 0..7 relative to the current rotation:
    // the search needs (8 - w) mod 8 rotations and one decision per rotation
    // plus the final one.
    for (int w = 0; w < 8; w++) begin
      automatic int off2 = (w - int'(rot) + 8) % 8;  // window = off2 + rot = w (mod 8)
      automatic int need = (8 - w) % 8;
      n_steps = 0;
      resync = 1; @(negedge clk); resync = 0;
      check(cnt_sw == PHASE_CODE_SYNC, "resync did not clear CntSW");
      run(off2, 2000, used);
      $display("resync, window %0d: locked=%0d rot=%0d steps=%0d symbols=%0d", w, cnt_sw, rot, n_steps, used);
      check(cnt_sw == PHASE_CHIP_SYNC, $sformatf("no lock after resync, window %0d", w));
      check((off2 + rot) % 8 == 0, $sformatf("locked at wrong rotation, window %0d", w));
      check(n_steps == need, $sformatf("expected %0d rotation steps, window %0d", need, w));
      check(used == (need + 1) * (SETTLE + AVG), $sformatf("decision time, window %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
