// muscle_artefact_removal: frame-wise wavelet-power detection and removal of
// muscle (myogenic) artefacts in the first two detail bands.
//
// Muscle activity lies above the beta band and carries more power than the
// EEG, so it shows up as frames of the d1 and d2 bands whose power stands out.
// The level-1 band (N/2 coefficients) is cut into S = ceil(N/2 / X) frames of
// X coefficients; d2, being half as long, is zero-padded between its
// coefficients to the same length, so its frame b is made of the X/2 real
// coefficients d2[b*X/2 .. (b+1)*X/2-1] (the zeros add no power). Then
//   1. P(a,b) = sum of squared coefficients of level a, frame b  (a = 1, 2)
//   2. M_b    = max(P(1,b), P(2,b))
//   3. M      = (sum over b of M_b) / S
//   4. every frame with P(a,b) > M has all its level-a coefficients set to 0.
// The comparison is made as P(a,b)*S > sum(M_b), which is exact and needs no
// divider. The integer Haar engine scales d1 by sqrt(2) and d2 by 2 relative
// to the orthonormal transform, so P(1,b) is doubled before use to put both
// levels on the same scale. When N/2 is not a multiple of X the last frame is
// shorter (N=2560, X=86: 14 full frames and one of 76 coefficients).
//
// Interface: pulse start; done pulses when the zeroing pass is over;
// flags1/flags2 show which frames of d1/d2 were cleared. Memory port as in
// coef_ram. Timing: 2 cycles per coefficient for the power pass, S cycles for
// the mean, 1 for the compare and 1 per coefficient for the clearing pass:
// 3*(N/2+N/4)+S+2 cycles from start to done (5777 at N=2560).
module muscle_artefact_removal
  import eeg_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned X  = DEF_FRAME_X,
  localparam int unsigned S  = ((N / 2) + X - 1) / X,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned PW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [S-1:0]  flags1,
  output logic [S-1:0]  flags2,
  output logic [AW-1:0] d_addr,
  output logic          d_we,
  output coef_t         d_wdata,
  input  coef_t         d_rdata
);
  if (X % 2 != 0) begin : g_bad_x
    $error("muscle_artefact_removal: X must be even");
  end

  typedef enum logic [2:0] {S_IDLE, S_ACC_RD, S_ACC_ADD, S_MAX, S_FLAG, S_ZERO, S_DONE} state_t;
  state_t state;

  logic [PW-1:0] p1 [S];
  logic [PW-1:0] p2 [S];
  logic [PW-1:0] acc, acc_n, msum;
  logic          lvl2;                 // 0: working on d1, 1: on d2
  logic [AW-1:0] k;                    // coefficient index within the band
  logic [AW-1:0] fcnt;                 // index within the frame
  logic [$clog2(S+1)-1:0] b;           // frame number
  logic [AW-1:0] off, band_last, frame_last;
  logic signed [2*COEF_W-1:0] sq;
  logic          frame_end, band_end;

  assign off        = lvl2 ? AW'(N / 2) : '0;
  assign band_last  = lvl2 ? AW'(N / 4 - 1) : AW'(N / 2 - 1);
  assign frame_last = lvl2 ? AW'(X / 2 - 1) : AW'(X - 1);
  assign frame_end  = (fcnt == frame_last) || (k == band_last);
  assign band_end   = (k == band_last);
  assign sq         = d_rdata * d_rdata;
  assign acc_n      = acc + PW'(unsigned'(sq));
  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      acc    <= '0;
      msum   <= '0;
      lvl2   <= 1'b0;
      k      <= '0;
      fcnt   <= '0;
      b      <= '0;
      flags1 <= '0;
      flags2 <= '0;
      for (int i = 0; i < S; i++) begin
        p1[i] <= '0;
        p2[i] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lvl2  <= 1'b0;
          k     <= '0;
          fcnt  <= '0;
          b     <= '0;
          acc   <= '0;
          msum  <= '0;
          state <= S_ACC_RD;
        end
        S_ACC_RD: state <= S_ACC_ADD;
        S_ACC_ADD: begin
          state <= S_ACC_RD;
          if (frame_end) begin
            if (lvl2) p2[b] <= acc_n;
            else      p1[b] <= acc_n << 1;
            acc  <= '0;
            fcnt <= '0;
            b    <= b + 1'b1;
          end else begin
            acc  <= acc_n;
            fcnt <= fcnt + 1'b1;
          end
          if (band_end) begin
            k <= '0;
            b <= '0;
            if (lvl2) state <= S_MAX;
            else lvl2 <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_MAX: begin
          msum <= msum + ((p1[b] > p2[b]) ? p1[b] : p2[b]);
          if (b == ($clog2(S+1))'(S - 1)) state <= S_FLAG;
          else b <= b + 1'b1;
        end
        S_FLAG: begin
          for (int i = 0; i < S; i++) begin
            flags1[i] <= (p1[i] * PW'(S)) > msum;
            flags2[i] <= (p2[i] * PW'(S)) > msum;
          end
          lvl2  <= 1'b0;
          k     <= '0;
          fcnt  <= '0;
          b     <= '0;
          state <= S_ZERO;
        end
        S_ZERO: begin
          if (frame_end) begin
            fcnt <= '0;
            b    <= b + 1'b1;
          end else begin
            fcnt <= fcnt + 1'b1;
          end
          if (band_end) begin
            k <= '0;
            b <= '0;
            if (lvl2) state <= S_DONE;
            else lvl2 <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    d_addr  = off + k;
    d_wdata = '0;
    d_we    = 1'b0;
    if (state == S_ZERO) d_we = lvl2 ? flags2[b] : flags1[b];
  end
endmodule
