// tb_cdma_flexible_bw - real-time bandwidth re-allocation between three data
// streams sharing the seven CDMA channels, run on the transceiver at its
// default parameters through the line model.
//
// Stream 1 always uses three channels (codes a, b and the c/e pair). Streams
// 2 and 3 share the remaining four channels (codes d, f, g, h): first stream
// 2 gets one channel and stream 3 three, then, at a symbol boundary in the
// middle of the run, stream 2 gets two and stream 3 two. The allocation is a
// packing of stream bits onto channels on both ends; the link itself is not
// told. Each stream carries one bit per allocated channel per symbol, so at a
// chip rate R its bandwidth is (channels * R / 8).
//
// The test locks the receiver, finds the symbol latency, unpacks every
// received word with the allocation that was in force when the word was sent
// and compares each stream's bits with what was sent. It counts the bits each
// stream delivered in each allocation and checks the ratios 3:1:3 and 3:2:2.
module tb_cdma_flexible_bw;
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

  // Owner stream (1..3) of each channel, for allocation 0 and allocation 1.
  typedef int unsigned owner_t [N_CH];
  localparam owner_t OWNER0 = '{1, 1, 1, 2, 3, 3, 3};
  localparam owner_t OWNER1 = '{1, 1, 1, 2, 2, 3, 3};

  int unsigned alloc = 0;                  // allocation used for the next word

  logic [N_CH-1:0] sent  [$];
  int unsigned     epoch [$];              // allocation of each sent word
  logic [N_CH-1:0] rcvd  [$];
  int rel;

  // Stream bits per word are drawn at random; the word is their packing.
  always @(posedge clk) begin
    if (tx_rst_n && tx_take) begin
      sent.push_back(tx_data);
      epoch.push_back(alloc);
      tx_data <= N_CH'($urandom);
    end
    if (rx_rst_n && rx_valid) rcvd.push_back(rx_data);
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

  function automatic bit match_window(input int L, input int span);
    automatic int nr = rcvd.size(), ns = sent.size();
    for (int k = 1; k <= span; k++) begin
      automatic int ir = nr - k, is = ns - k - L;
      if (ir < 0 || is < 0) return 0;
      if (rcvd[ir] != sent[is]) return 0;
    end
    return 1;
  endfunction

  function automatic int unsigned owner(input int unsigned a, input int ch);
    return (a == 0) ? OWNER0[ch] : OWNER1[ch];
  endfunction

  initial begin
    automatic int lag = -1;
    automatic int first;
    automatic int bits [2][4];
    automatic int words [2];
    tx_rst_n = 1'b0; rx_rst_n = 1'b0;
    tx_data = '0; rx_resync = 1'b0;
    tx_code_we = 1'b0; tx_code_waddr = '0; tx_code_wdata = '0;
    rx_code_we = 1'b0; rx_code_waddr = '0; rx_code_wdata = '0;
    dsub = 4 * OVS + 5;
    for (int a = 0; a < 2; a++) begin
      words[a] = 0;
      for (int s = 0; s < 4; s++) bits[a][s] = 0;
    end
    repeat (5) @(posedge clk);
    @(negedge clk);
    tx_rst_n = 1'b1;
    rx_rst_n = 1'b1;

    // Lock.
    for (int n = 0; n < 8 * 8 * 80 && rx_cnt_sw != PHASE_CHIP_SYNC; n++) @(posedge clk);
    check(rx_cnt_sw == PHASE_CHIP_SYNC, "code synchronization did not complete");
    symbols(300);
    for (int L = 0; L < 16; L++)
      if (match_window(L, 32)) begin
        lag = L;
        rel = rcvd.size() - sent.size() + L;
        break;
      end
    check(lag >= 0, "no symbol latency found");
    first = rcvd.size();

    // Allocation 0 for 200 symbols, then switch at a symbol boundary.
    symbols(200);
    @(posedge clk iff tx_take);
    alloc = 1;
    symbols(200);
    symbols(lag + 4);

    // Unpack every word received since `first` into the three streams.
    for (int i = first; i < rcvd.size(); i++) begin
      automatic int is = i - rel;
      if (is < 0 || is >= sent.size()) continue;
      words[epoch[is]]++;
      for (int ch = 0; ch < N_CH; ch++) begin
        automatic int unsigned s = owner(epoch[is], ch);
        checks++;
        if (rcvd[i][ch] != sent[is][ch]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: stream %0d bit on channel %0d of word %0d", s, ch, is);
        end else begin
          bits[epoch[is]][s]++;
        end
      end
    end

    for (int a = 0; a < 2; a++)
      $display("allocation %0d: %0d symbols, stream bits 1:%0d 2:%0d 3:%0d",
               a, words[a], bits[a][1], bits[a][2], bits[a][3]);
    check(words[0] > 100 && words[1] > 100, "too few symbols in one allocation");
    check(bits[0][1] == 3 * words[0] && bits[0][2] == words[0] && bits[0][3] == 3 * words[0],
          "allocation 0 rates are not 3:1:3 channels");
    check(bits[1][1] == 3 * words[1] && bits[1][2] == 2 * words[1] && bits[1][3] == 2 * words[1],
          "allocation 1 rates are not 3:2:2 channels");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
