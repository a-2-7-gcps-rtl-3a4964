// cdma_chip_sync - chip synchronizer: a delay-locked loop that centres the
// sampling instant on the chips.
//
// Four correlators correlate the current symbol of samples with codes "c"
// and "e" rotated one chip right (late replicas) and one chip left (early
// replicas). Gilbert cell B multiplies the two late correlations (function
// "j"), Gilbert cell C the two early ones (function "k"). Their difference
// j - k is an early/late delay discriminator: zero when the samples sit on
// the chip centres, positive when sampling is early and negative when it is
// late. The loop filter integrates j - k; each time the integral passes
// +/-(64*AMP*AMP << LF_LOG2) it moves the delay code one step (1/OVS chip)
// against the error and restarts.
//
// While cnt_sw is PHASE_CODE_SYNC the delay code is held at DLY_INIT, as the
// switches SW1/SW2 hold the delay control voltages constant during code
// synchronization; the loop runs once cnt_sw is PHASE_CHIP_SYNC.
//
// Timing: one discriminator sample per symbol (`sym_en`); `step_late` and
// `step_early` pulse when the delay code moves. The digital integrator and
// step threshold stand in for the analog loop filter and are this design's
// choice; the delay code saturates at 0 and 2*OVS-1.
module cdma_chip_sync
  import cdma_pkg::*;
#(
  parameter int unsigned OVS     = 8,
  parameter int unsigned SW      = 8,
  parameter int unsigned AMP     = 8,
  parameter int unsigned LF_LOG2 = 3,
  localparam int unsigned DW     = $clog2(2 * OVS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sym_en,
  input  logic signed [SW-1:0]  samples [8],
  input  sync_phase_e           cnt_sw,
  output logic [DW-1:0]         dly,
  output logic                  step_late,    // pulse: sampling moved later
  output logic                  step_early    // pulse: sampling moved earlier
);

  localparam int unsigned CW  = SW + 4;
  localparam int unsigned LW  = 2 * CW + LF_LOG2 + 3;
  localparam logic [DW-1:0] DLY_INIT = DW'(OVS);
  localparam logic [DW-1:0] DLY_MAX  = DW'(2 * OVS - 1);
  localparam longint LF_TH = (64 * longint'(AMP) * longint'(AMP)) << LF_LOG2;

  logic signed [CW-1:0]   c_r, e_r, c_l, e_l;
  logic signed [2*CW-1:0] j_fn, k_fn;
  logic signed [2*CW:0]   err;
  logic signed [LW-1:0]   lf, lf_next;

  cdma_correlator #(.SW(SW)) u_corr_cr (.samples, .code(SYNC_C_RIGHT), .corr(c_r));
  cdma_correlator #(.SW(SW)) u_corr_er (.samples, .code(SYNC_E_RIGHT), .corr(e_r));
  cdma_correlator #(.SW(SW)) u_corr_cl (.samples, .code(SYNC_C_LEFT),  .corr(c_l));
  cdma_correlator #(.SW(SW)) u_corr_el (.samples, .code(SYNC_E_LEFT),  .corr(e_l));

  cdma_gilbert_cell #(.W(CW)) u_gilbert_b (.a(c_r), .b(e_r), .p(j_fn));
  cdma_gilbert_cell #(.W(CW)) u_gilbert_c (.a(c_l), .b(e_l), .p(k_fn));

  // The two Gilbert cells' output currents are subtracted by wiring.
  assign err     = (2*CW+1)'(j_fn) - (2*CW+1)'(k_fn);
  assign lf_next = lf + LW'(err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly        <= DLY_INIT;
      lf         <= '0;
      step_late  <= 1'b0;
      step_early <= 1'b0;
    end else begin
      step_late  <= 1'b0;
      step_early <= 1'b0;
      if (cnt_sw == PHASE_CODE_SYNC) begin
        dly <= DLY_INIT;
        lf  <= '0;
      end else if (sym_en) begin
        if (64'(lf_next) > LF_TH) begin
          // Sampling early: delay the sampler clocks by one more step.
          lf <= '0;
          if (dly != DLY_MAX) begin
            dly       <= dly + 1'b1;
            step_late <= 1'b1;
          end
        end else if (64'(lf_next) < -LF_TH) begin
          // Sampling late: one step less delay.
          lf <= '0;
          if (dly != '0) begin
            dly        <= dly - 1'b1;
            step_early <= 1'b1;
          end
        end else begin
          lf <= lf_next;
        end
      end
    end
  end

endmodule
