// eeg_coprocessor: artefact-removal co-processor for one EEG channel record.
//
// The host loads a record of N samples (10 s at 256 Hz by default) into the
// sample memory, sets the denoising thresholds and pulses start. The record
// is then processed in place, in this order:
//   FWD  haar_dwt forward, 4 levels: X <- a4, D <- d1..d4
//   CAP  blink_artefact_removal notes which a4 coefficients are negative
//   DEN  wavelet_denoise soft-thresholds d1 and d2
//   MUS  muscle_artefact_removal clears high-power frames of d1 and d2
//   INV  haar_dwt inverse: X <- f' (muscle-free, denoised record)
//   BLK  blink_artefact_removal clamps f' to the global mean of the blink
//        windows
// after which the host reads the cleaned record back from the same memory.
// The method draws denoising, muscle removal and blink removal as a chain of
// separate blocks, each with its own wavelet transform; because the Haar
// analysis of a re-synthesised signal gives back the same coefficients, one
// shared decomposition and one reconstruction do the same work here with one
// transform engine and two memories. The FastICA stage that precedes the chain
// is not part of this block: the record loaded is one unmixed component.
//
// Memories: X (N words) holds samples / approximations, D (N words) the
// detail bands. Both are single-port with one-cycle read latency (coef_ram).
//
// Interface: host_* is a memory port onto X, usable while busy is low:
// host_we writes host_wdata at host_addr; host_rdata returns X[host_addr] one
// cycle later. start is honoured when idle; done pulses at the end; cycles
// holds the length of the last run in clock cycles (34,630 at the defaults, see the per-phase
// counts in the README).
module eeg_coprocessor
  import eeg_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned LEVELS    = DEF_LEVELS,
  parameter int unsigned X         = DEF_FRAME_X,
  parameter int unsigned WIN       = DEF_BLINK_WIN,
  parameter int unsigned DN_LEVELS = DEF_DN_LEVELS,
  localparam int unsigned S        = ((N / 2) + X - 1) / X,
  localparam int unsigned AW       = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  coef_t         thr [DN_LEVELS],
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  coef_t         host_wdata,
  output coef_t         host_rdata,
  output coef_t         gm,
  output logic [AW:0]   neg_count,
  output logic [AW:0]   clamp_count,
  output logic [S-1:0]  flags1,
  output logic [S-1:0]  flags2,
  output logic [31:0]   cycles
);
  typedef enum logic [2:0] {P_IDLE, P_FWD, P_CAP, P_DEN, P_MUS, P_INV, P_BLK, P_DONE} phase_t;
  phase_t phase;
  logic   kick;       // first cycle of a phase: start the sub-block

  // Memory ports
  logic [AW-1:0] xa, da;
  logic          xwe, dwe;
  coef_t         xwd, dwd, xrd, drd;

  // Sub-block ports
  logic [AW-1:0] dwt_xa, dwt_da, bl_xa, dn_da, mu_da;
  logic          dwt_xwe, dwt_dwe, bl_xwe, dn_dwe, mu_dwe;
  coef_t         dwt_xwd, dwt_dwd, bl_xwd, dn_dwd, mu_dwd;
  logic          dwt_busy, dwt_done, bl_busy, bl_done, dn_busy, dn_done, mu_busy, mu_done;
  logic          sub_done;

  coef_ram #(.DEPTH(N), .W(COEF_W)) u_xmem (.clk, .addr(xa), .we(xwe), .wdata(xwd), .rdata(xrd));
  coef_ram #(.DEPTH(N), .W(COEF_W)) u_dmem (.clk, .addr(da), .we(dwe), .wdata(dwd), .rdata(drd));

  haar_dwt #(.N(N), .LEVELS(LEVELS)) u_dwt (
    .clk, .rst_n,
    .start  (kick && (phase == P_FWD || phase == P_INV)),
    .inverse(phase == P_INV),
    .busy(dwt_busy), .done(dwt_done),
    .x_addr(dwt_xa), .x_we(dwt_xwe), .x_wdata(dwt_xwd), .x_rdata(xrd),
    .d_addr(dwt_da), .d_we(dwt_dwe), .d_wdata(dwt_dwd), .d_rdata(drd)
  );

  wavelet_denoise #(.N(N), .DN_LEVELS(DN_LEVELS)) u_den (
    .clk, .rst_n,
    .start(kick && phase == P_DEN), .thr,
    .busy(dn_busy), .done(dn_done),
    .d_addr(dn_da), .d_we(dn_dwe), .d_wdata(dn_dwd), .d_rdata(drd)
  );

  muscle_artefact_removal #(.N(N), .X(X)) u_mus (
    .clk, .rst_n,
    .start(kick && phase == P_MUS),
    .busy(mu_busy), .done(mu_done), .flags1, .flags2,
    .d_addr(mu_da), .d_we(mu_dwe), .d_wdata(mu_dwd), .d_rdata(drd)
  );

  blink_artefact_removal #(.N(N), .LEVELS(LEVELS), .WIN(WIN)) u_blk (
    .clk, .rst_n,
    .start_capture(kick && phase == P_CAP),
    .start_remove (kick && phase == P_BLK),
    .busy(bl_busy), .done(bl_done), .gm, .neg_count, .clamp_count,
    .x_addr(bl_xa), .x_we(bl_xwe), .x_wdata(bl_xwd), .x_rdata(xrd)
  );

  always_comb begin
    unique case (phase)
      P_FWD, P_INV: sub_done = dwt_done;
      P_CAP, P_BLK: sub_done = bl_done;
      P_DEN:        sub_done = dn_done;
      P_MUS:        sub_done = mu_done;
      default:      sub_done = 1'b0;
    endcase
  end

  assign busy       = (phase != P_IDLE);
  assign done       = (phase == P_DONE);
  assign host_rdata = xrd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= P_IDLE;
      kick   <= 1'b0;
      cycles <= '0;
    end else begin
      kick <= 1'b0;
      if (phase != P_IDLE && phase != P_DONE) cycles <= cycles + 1;
      unique case (phase)
        P_IDLE: if (start) begin
          phase  <= P_FWD;
          kick   <= 1'b1;
          cycles <= '0;
        end
        P_FWD: if (sub_done) begin phase <= P_CAP; kick <= 1'b1; end
        P_CAP: if (sub_done) begin phase <= P_DEN; kick <= 1'b1; end
        P_DEN: if (sub_done) begin phase <= P_MUS; kick <= 1'b1; end
        P_MUS: if (sub_done) begin phase <= P_INV; kick <= 1'b1; end
        P_INV: if (sub_done) begin phase <= P_BLK; kick <= 1'b1; end
        P_BLK: if (sub_done) phase <= P_DONE;
        P_DONE:  phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end

  // Memory port routing by phase.
  always_comb begin
    xa = host_addr; xwe = host_we && (phase == P_IDLE); xwd = host_wdata;
    da = '0;        dwe = 1'b0;                       dwd = '0;
    unique case (phase)
      P_FWD, P_INV: begin
        xa = dwt_xa; xwe = dwt_xwe; xwd = dwt_xwd;
        da = dwt_da; dwe = dwt_dwe; dwd = dwt_dwd;
      end
      P_CAP, P_BLK: begin
        xa = bl_xa; xwe = bl_xwe; xwd = bl_xwd;
      end
      P_DEN: begin
        da = dn_da; dwe = dn_dwe; dwd = dn_dwd;
      end
      P_MUS: begin
        da = mu_da; dwe = mu_dwe; dwd = mu_dwd;
      end
      default: ;
    endcase
  end

  // The sub-blocks run one at a time.
  a_one_active: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({dwt_busy, dn_busy, mu_busy, bl_busy}));
endmodule
