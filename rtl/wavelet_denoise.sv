// wavelet_denoise: wavelet soft-threshold denoising of the detail bands.
//
// The method removes mains and other broadband interference from each
// unmixed channel by thresholding its wavelet detail coefficients with the
// soft rule  d' = sign(d) * max(|d| - thr, 0). This block walks the detail
// memory band by band (d1, then d2, ... up to DN_LEVELS) and rewrites each
// coefficient in place. The threshold of each band is a run-time input
// (thr[z-1] for level z) in the units of the integer Haar engine, i.e.
// 2^(z/2) times an orthonormal-transform threshold; the method names soft
// thresholding but gives neither the threshold rule nor the number of levels,
// so both are left to software here (DN_LEVELS = 2 by default: at 256 Hz the
// 50-60 Hz band falls in d2). Running it on the shared decomposition, rather
// than on a separate transform followed by a new one, gives the same result
// because the Haar analysis of the re-synthesised signal returns the same
// coefficients.
//
// Interface: pulse start; done pulses when finished. Memory port as in
// coef_ram. Timing: 2 cycles per coefficient, N/2+N/4 coefficients for two
// levels (3840 cycles at N=2560).
module wavelet_denoise
  import eeg_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned DN_LEVELS = DEF_DN_LEVELS,
  localparam int unsigned AW       = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  coef_t         thr [DN_LEVELS],
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] d_addr,
  output logic          d_we,
  output coef_t         d_wdata,
  input  coef_t         d_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR, S_DONE} state_t;
  state_t state;

  logic [3:0]    lvl;
  logic [AW-1:0] k;
  logic [AW-1:0] off;
  coef_t         cur_thr;

  assign off     = AW'(N - (N >> (lvl - 1)));
  always_comb begin
    cur_thr = thr[0];
    for (int i = 0; i < DN_LEVELS; i++)
      if (lvl == 4'(i + 1)) cur_thr = thr[i];
  end
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lvl   <= 4'd1;
      k     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lvl   <= 4'd1;
          k     <= '0;
          state <= S_RD;
        end
        S_RD: state <= S_WR;
        S_WR: begin
          state <= S_RD;
          if (k == AW'((N >> lvl) - 1)) begin
            k <= '0;
            if (lvl == 4'(DN_LEVELS)) state <= S_DONE;
            else lvl <= lvl + 4'd1;
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
    d_we    = (state == S_WR);
    d_wdata = soft_thr(d_rdata, cur_thr);
  end
endmodule
