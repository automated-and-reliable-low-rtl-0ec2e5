// haar_dwt: multi-level Haar wavelet transform engine, forward and inverse,
// working in place on the co-processor's two coefficient memories.
//
// Forward (inverse=0): for level z = 1..LEVELS the current approximation
// X[0 .. L-1] (L = N/2^(z-1)) is split pairwise into
//     a_k = X[2k] + X[2k+1]  -> X[k]
//     d_k = X[2k] - X[2k+1]  -> D[off(z) + k],  off(z) = N - N/2^(z-1)
// so D ends up holding d1, d2, d3, d4 back to back and X[0 .. N/16-1] holds
// the level-4 approximation. Inverse (inverse=1) walks the levels back down,
// k descending so the in-place update never overwrites an unread word:
//     X[2k] = (a_k + d_k) >>> 1,   X[2k+1] = (a_k - d_k) >>> 1.
// The Haar butterfly of the method divides every sum and difference by
// sqrt(2); this engine leaves the factor out of the forward pass and divides
// by 2 in the inverse, which is the same transform up to a known per-level
// scale (level-z coefficients are 2^(z/2) times the orthonormal ones) and needs
// no multiplier. Inverse after forward with unchanged details restores the
// record exactly.
//
// Interface: pulse start with inverse selecting the direction; busy is high
// until done pulses for one cycle. Memory ports follow coef_ram (read data one
// cycle after the address). Timing: 3 cycles per butterfly, about
// 3*(N/2+N/4+...+N/2^LEVELS) cycles per direction (7200 for N=2560).
module haar_dwt
  import eeg_pkg::*;
#(
  parameter int unsigned N      = DEF_N,
  parameter int unsigned LEVELS = DEF_LEVELS,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inverse,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] x_addr,
  output logic          x_we,
  output coef_t         x_wdata,
  input  coef_t         x_rdata,
  output logic [AW-1:0] d_addr,
  output logic          d_we,
  output coef_t         d_wdata,
  input  coef_t         d_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_F_RD0, S_F_RD1, S_F_WR, S_I_RD, S_I_WR0, S_I_WR1, S_DONE} state_t;
  state_t state;

  logic [3:0]    lvl;
  logic [AW-1:0] k;
  coef_t         even, dif_r;
  logic [AW-1:0] off;

  assign off  = AW'(N - (N >> (lvl - 1)));
  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lvl   <= '0;
      k     <= '0;
      even  <= '0;
      dif_r <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          if (inverse) begin
            lvl   <= 4'(LEVELS);
            k     <= AW'((N >> LEVELS) - 1);
            state <= S_I_RD;
          end else begin
            lvl   <= 4'd1;
            k     <= '0;
            state <= S_F_RD0;
          end
        end
        S_F_RD0: state <= S_F_RD1;
        S_F_RD1: begin
          even  <= x_rdata;
          state <= S_F_WR;
        end
        S_F_WR: begin
          state <= S_F_RD0;
          if (k == AW'((N >> lvl) - 1)) begin
            k <= '0;
            if (lvl == 4'(LEVELS)) state <= S_DONE;
            else lvl <= lvl + 4'd1;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_I_RD: state <= S_I_WR0;
        S_I_WR0: begin
          dif_r <= x_rdata - d_rdata;
          state <= S_I_WR1;
        end
        S_I_WR1: begin
          state <= S_I_RD;
          if (k == '0) begin
            if (lvl == 4'd1) state <= S_DONE;
            else begin
              lvl <= lvl - 4'd1;
              k   <= AW'((N >> (lvl - 1)) - 1);
            end
          end else begin
            k <= k - 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Memory port drive.
  always_comb begin
    x_addr  = '0;
    x_we    = 1'b0;
    x_wdata = '0;
    d_addr  = '0;
    d_we    = 1'b0;
    d_wdata = '0;
    unique case (state)
      S_F_RD0: x_addr = AW'({k, 1'b0});
      S_F_RD1: x_addr = AW'({k, 1'b1});
      S_F_WR: begin
        x_addr  = k;
        x_we    = 1'b1;
        x_wdata = even + x_rdata;
        d_addr  = off + k;
        d_we    = 1'b1;
        d_wdata = even - x_rdata;
      end
      S_I_RD: begin
        x_addr = k;
        d_addr = off + k;
      end
      S_I_WR0: begin
        x_addr  = AW'({k, 1'b0});
        x_we    = 1'b1;
        x_wdata = (x_rdata + d_rdata) >>> 1;
      end
      S_I_WR1: begin
        x_addr  = AW'({k, 1'b1});
        x_we    = 1'b1;
        x_wdata = dif_r >>> 1;
      end
      default: ;
    endcase
  end
endmodule
