// cdma_code_sync - code (symbol) synchronizer: finds the symbol boundary.
//
// Two correlators correlate the current symbol of samples with codes "c" and
// "e"; a Gilbert cell multiplies the two results. Both codes carry the same
// bit, so the product is large and positive only when the receiver's symbol
// window lines up with the transmitter's (the composite code c*e has a sharp
// autocorrelation peak at zero shift). The product is summed over 2**AVG_LOG2
// symbols and compared with a threshold of THR_Q8/256 of the aligned value.
// The control unit then either
//   - rotates the sampler clocks by one chip (rot + 1, pulse rot_step) and
//     waits SETTLE symbols for the sampler pipeline to refill, or
//   - declares code synchronization complete and raises cnt_sw (CntSW),
//     which freezes the rotation and hands over to the chip synchronizer.
// `resync` returns to code synchronization from any state.
//
// Timing: one decision per SETTLE + 2**AVG_LOG2 symbols; `sym_en` marks the
// cycle in which a new symbol of samples is present. AMP is the sample value
// of one code's +1 chip, so an aligned correlation is 8*AMP and the aligned
// product 64*AMP*AMP.
// The document specifies a single comparison of the product with a
// threshold. Summing over several symbols, the threshold value, the settle
// time and `resync` are this design's choices: with all seven channels
// carrying data, one symbol's product at a wrong boundary can exceed the
// aligned value, while its average cannot.
module cdma_code_sync
  import cdma_pkg::*;
#(
  parameter int unsigned SW       = 8,
  parameter int unsigned AMP      = 8,
  parameter int unsigned AVG_LOG2 = 6,
  parameter int unsigned THR_Q8   = 115,
  parameter int unsigned SETTLE   = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sym_en,
  input  logic signed [SW-1:0]  samples [8],
  input  logic                  resync,
  output logic [2:0]            rot,        // CntMUX
  output sync_phase_e           cnt_sw,     // CntSW
  output logic                  rot_step,   // pulse: clocks rotated
  output logic                  locked_evt  // pulse: code sync completed
);

  localparam int unsigned CW = SW + 4;
  localparam int unsigned AW = 2 * CW + AVG_LOG2 + 1;
  localparam longint      FULL = 64 * longint'(AMP) * longint'(AMP);
  localparam longint      THR  = ((longint'(THR_Q8) * FULL) << AVG_LOG2) >>> 8;
  localparam int unsigned NW = (AVG_LOG2 > 2) ? AVG_LOG2 + 1 : 3;

  typedef enum logic [1:0] {ST_SETTLE, ST_INTEG, ST_LOCKED} state_e;

  logic signed [CW-1:0]   corr_c, corr_e;
  logic signed [2*CW-1:0] prod;
  logic signed [AW-1:0]   acc;
  logic [NW-1:0]          cnt;
  state_e                 state;
  logic                   above;

  cdma_correlator #(.SW(SW)) u_corr_c (.samples, .code(SYNC_C), .corr(corr_c));
  cdma_correlator #(.SW(SW)) u_corr_e (.samples, .code(SYNC_E), .corr(corr_e));
  cdma_gilbert_cell #(.W(CW)) u_gilbert_a (.a(corr_c), .b(corr_e), .p(prod));

  // Comparator against the threshold, using the sum including this symbol.
  assign above = (64'(acc) + 64'(prod)) > THR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_SETTLE;
      rot        <= 3'd0;
      cnt_sw     <= PHASE_CODE_SYNC;
      acc        <= '0;
      cnt        <= '0;
      rot_step   <= 1'b0;
      locked_evt <= 1'b0;
    end else begin
      rot_step   <= 1'b0;
      locked_evt <= 1'b0;
      if (resync) begin
        state  <= ST_SETTLE;
        cnt_sw <= PHASE_CODE_SYNC;
        acc    <= '0;
        cnt    <= '0;
      end else if (sym_en) begin
        unique case (state)
          ST_SETTLE: begin
            if (cnt == NW'(SETTLE - 1)) begin
              cnt   <= '0;
              acc   <= '0;
              state <= ST_INTEG;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          ST_INTEG: begin
            acc <= acc + AW'(prod);
            if (cnt == NW'((1 << AVG_LOG2) - 1)) begin
              cnt <= '0;
              if (above) begin
                state      <= ST_LOCKED;
                cnt_sw     <= PHASE_CHIP_SYNC;
                locked_evt <= 1'b1;
              end else begin
                rot      <= rot + 3'd1;
                rot_step <= 1'b1;
                state    <= ST_SETTLE;
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          ST_LOCKED: ;
          default: state <= ST_SETTLE;
        endcase
      end
    end
  end

endmodule
