// blink_artefact_removal: eye-blink detection through the level-4
// approximation and removal by clamping to a global mean.
//
// A blink is a large, slow, negative excursion. The method finds it in the
// level-4 approximation (theta band at 256 Hz) and then works in the time
// domain on the reconstructed record f':
//   capture (before the inverse transform, X[0 .. N/2^LEVELS-1] = a4):
//     negflag[m] = (a4[m] < 0)
//   remove (after the inverse transform, X = f'):
//     a sample t is "in a window" when some m with negflag[m] set covers it:
//       2^LEVELS*m - WIN <= t <= 2^LEVELS*m + 2^LEVELS-1 + WIN
//     (the block of 2^LEVELS samples that a4[m] stands for, widened by the
//      +/-0.2 s window of the method, WIN samples on each side);
//     GM = mean of all negative samples that lie in some window (a sample in
//          overlapping windows is counted once), truncated toward zero;
//     every sample below GM is set to GM.
// This is the "global mean only" variant the method settles on after its
// comparisons; the zeroing and local-mean variants are not built. When no
// negative sample falls in a window nothing is changed (GM reads 0).
//
// Interface: pulse start_capture while X holds the decomposition, later
// pulse start_remove while X holds f'; done pulses at the end of each.
// gm, neg_count and clamp_count report the last removal. Memory port as in
// coef_ram. Timing from start to done: capture 2*N/2^LEVELS+1 cycles (321);
// removal 2 cycles per sample for the mean, 41 for the divider and 2 per
// sample for the clamp, 4N+43 cycles in all (10,283 at N=2560), or 2N+2 when
// no window holds a negative sample.
module blink_artefact_removal
  import eeg_pkg::*;
#(
  parameter int unsigned N      = DEF_N,
  parameter int unsigned LEVELS = DEF_LEVELS,
  parameter int unsigned WIN    = DEF_BLINK_WIN,
  localparam int unsigned BLK   = 1 << LEVELS,
  localparam int unsigned M     = N >> LEVELS,
  localparam int unsigned J     = (2 * WIN + BLK - 1) / BLK + 2,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned SW    = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_capture,
  input  logic          start_remove,
  output logic          busy,
  output logic          done,
  output coef_t         gm,
  output logic [AW:0]   neg_count,
  output logic [AW:0]   clamp_count,
  output logic [AW-1:0] x_addr,
  output logic          x_we,
  output coef_t         x_wdata,
  input  coef_t         x_rdata
);
  typedef enum logic [3:0] {S_IDLE, S_CAP_RD, S_CAP_WR, S_SUM_RD, S_SUM_ACC,
                            S_DIV, S_DIV_WAIT, S_CLP_RD, S_CLP_WR, S_DONE} state_t;
  state_t state;

  logic [M-1:0]  negflag;
  logic [AW-1:0] t;
  logic [SW-1:0] nsum;              // magnitude of the sum of selected samples
  logic          in_win;
  logic          div_start, div_busy, div_done;
  logic [SW-1:0] quot, rem_unused;

  // Window membership of sample t: look at the few a4 positions whose
  // widened block can reach t.
  always_comb begin
    int m_hi, m;
    in_win = 1'b0;
    m_hi = (int'(t) + int'(WIN)) / int'(BLK);
    for (int j = 0; j < J; j++) begin
      m = m_hi - j;
      if (m >= 0 && m < int'(M))
        if (negflag[m] && (int'(t) <= m * int'(BLK) + int'(BLK) - 1 + int'(WIN)))
          in_win = 1'b1;
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign div_start = (state == S_DIV) && (neg_count != '0);

  seq_divider #(.W(SW)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (nsum),
    .divisor  (SW'(neg_count)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quot),
    .remainder(rem_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      negflag     <= '0;
      t           <= '0;
      nsum        <= '0;
      gm          <= '0;
      neg_count   <= '0;
      clamp_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          t <= '0;
          if (start_capture) state <= S_CAP_RD;
          else if (start_remove) begin
            nsum        <= '0;
            neg_count   <= '0;
            clamp_count <= '0;
            state       <= S_SUM_RD;
          end
        end
        S_CAP_RD: state <= S_CAP_WR;
        S_CAP_WR: begin
          negflag[t[$clog2(M)-1:0]] <= x_rdata[COEF_W-1];
          if (t == AW'(M - 1)) state <= S_DONE;
          else begin
            t     <= t + 1'b1;
            state <= S_CAP_RD;
          end
        end
        S_SUM_RD: state <= S_SUM_ACC;
        S_SUM_ACC: begin
          if (in_win && x_rdata[COEF_W-1]) begin
            nsum      <= nsum + SW'(unsigned'(-x_rdata));
            neg_count <= neg_count + 1'b1;
          end
          if (t == AW'(N - 1)) state <= S_DIV;
          else begin
            t     <= t + 1'b1;
            state <= S_SUM_RD;
          end
        end
        S_DIV: begin
          t <= '0;
          if (neg_count == '0) begin
            gm    <= '0;
            state <= S_DONE;
          end else begin
            state <= S_DIV_WAIT;
          end
        end
        S_DIV_WAIT: if (div_done) begin
          gm    <= -coef_t'(quot);
          state <= S_CLP_RD;
        end
        S_CLP_RD: state <= S_CLP_WR;
        S_CLP_WR: begin
          if ($signed(x_rdata) < $signed(gm)) clamp_count <= clamp_count + 1'b1;
          if (t == AW'(N - 1)) state <= S_DONE;
          else begin
            t     <= t + 1'b1;
            state <= S_CLP_RD;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    x_addr  = t;
    x_we    = (state == S_CLP_WR) && ($signed(x_rdata) < $signed(gm));
    x_wdata = gm;
  end
endmodule
