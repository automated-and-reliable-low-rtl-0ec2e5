// ahb_peripheral: AHB-Lite slave that puts the EEG artefact-removal
// co-processor on the processor's bus (the "peripheral" slave).
//
// The processor loads one record of N 16-bit samples, sets the soft
// thresholds, writes CTRL.start and polls STATUS until done, then reads the
// cleaned record back. Register map (offsets from the slave's base; word
// accesses; the map is this design's own):
//   0x000 CTRL        W  bit0: start a run (ignored while busy)
//   0x004 STATUS      R  bit0: busy, bit1: done (set at the end of a run,
//                        cleared by the next start)
//   0x008 GM          R  global mean of the last blink removal (signed)
//   0x00C WIN_COUNT   R  negative samples found in blink windows
//   0x010 CLAMPED     R  samples clamped to GM
//   0x014 FLAGS1      R  muscle frames cleared in d1 (bit b = frame b)
//   0x018 FLAGS2      R  muscle frames cleared in d2
//   0x01C CYCLES      R  clock cycles taken by the last run
//   0x040+4z THR[z]   RW soft threshold of detail level z+1 (24-bit)
//   0x8000+4i SAMPLE[i] RW sample i; bits [15:0] written (sign-extended
//                        inside), reads return the sign-extended word
// Registers answer with zero wait states. A sample read takes one wait state
// (the sample memory is synchronous). A sample access while a run is in
// progress, or with i >= N, gets the two-cycle ERROR response. Other offsets
// read as zero and ignore writes.
// OUT_DATA shows the upper byte of the last sample read over the bus and
// clk_1 toggles each time it changes: the two pins of the block whose use the
// design leaves open are given this observation role here. rst is active low.
module ahb_peripheral
  import ahb_pkg::*;
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
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] HADDR,
  input  logic [2:0]  HSIZE,
  input  logic [1:0]  HTRANS,
  input  logic [31:0] HWDATA,
  input  logic        HWRITE,
  input  logic        HSEL,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP,
  output logic [7:0]  OUT_DATA,
  output logic        clk_1
);
  typedef enum logic [1:0] {D_NONE, D_ACTIVE, D_RD2, D_ERR2} dstate_t;
  dstate_t st;

  logic        dp_write;
  logic [15:0] dp_off;
  logic        accept;

  // co-processor
  logic          cop_start, cop_busy, cop_done;
  coef_t         thr [DN_LEVELS];
  logic [AW-1:0] host_addr;
  logic          host_we;
  coef_t         host_wdata, host_rdata, gm;
  logic [AW:0]   neg_count, clamp_count;
  logic [S-1:0]  flags1, flags2;
  logic [31:0]   cycles;
  logic          done_flag;

  logic        is_sample, bad_sample;
  logic [15:0] idx;

  assign accept     = HSEL && HREADY && HTRANS[1];
  assign is_sample  = dp_off[15];
  assign idx        = {3'b000, dp_off[14:2]};
  assign bad_sample = is_sample && (cop_busy || idx >= 16'(N));

  eeg_coprocessor #(.N(N), .LEVELS(LEVELS), .X(X), .WIN(WIN), .DN_LEVELS(DN_LEVELS)) u_cop (
    .clk, .rst_n(rst),
    .start(cop_start), .busy(cop_busy), .done(cop_done),
    .thr, .host_addr, .host_we, .host_wdata, .host_rdata,
    .gm, .neg_count, .clamp_count, .flags1, .flags2, .cycles
  );

  // Data-phase state: which part of a transfer the bus is in.
  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      st       <= D_NONE;
      dp_write <= 1'b0;
      dp_off   <= '0;
    end else begin
      if (accept) begin
        st       <= D_ACTIVE;
        dp_write <= HWRITE;
        dp_off   <= HADDR[15:0];
      end else if (st == D_ACTIVE && bad_sample) begin
        st <= D_ERR2;
      end else if (st == D_ACTIVE && is_sample && !dp_write) begin
        st <= D_RD2;
      end else if (HREADY) begin
        st <= D_NONE;
      end
    end
  end

  // Registers written over the bus.
  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      for (int z = 0; z < DN_LEVELS; z++) thr[z] <= '0;
      done_flag <= 1'b0;
      OUT_DATA  <= '0;
      clk_1     <= 1'b0;
    end else begin
      if (st == D_ACTIVE && dp_write && !is_sample)
        for (int z = 0; z < DN_LEVELS; z++)
          if (dp_off == 16'(16'h40 + 4 * z)) thr[z] <= coef_t'(HWDATA[COEF_W-1:0]);
      if (cop_start) done_flag <= 1'b0;
      else if (cop_done) done_flag <= 1'b1;
      if (st == D_RD2) begin
        OUT_DATA <= host_rdata[15:8];
        clk_1    <= ~clk_1;
      end
    end
  end

  assign cop_start  = (st == D_ACTIVE) && dp_write && (dp_off == 16'h0000) && HWDATA[0] && !cop_busy;
  assign host_addr  = AW'(idx);
  assign host_we    = (st == D_ACTIVE) && dp_write && is_sample && !bad_sample;
  assign host_wdata = coef_t'($signed(HWDATA[15:0]));

  // Read data and response.
  always_comb begin
    HRDATA    = '0;
    HREADYOUT = 1'b1;
    HRESP     = HRESP_OKAY;
    unique case (st)
      D_ACTIVE: begin
        if (bad_sample) begin
          HREADYOUT = 1'b0;
          HRESP     = HRESP_ERROR;
        end else if (is_sample) begin
          HREADYOUT = dp_write;          // reads wait one cycle for the memory
        end else if (!dp_write) begin
          unique case (dp_off)
            16'h0004: HRDATA = {30'd0, done_flag, cop_busy};
            16'h0008: HRDATA = 32'($signed(gm));
            16'h000C: HRDATA = 32'(neg_count);
            16'h0010: HRDATA = 32'(clamp_count);
            16'h0014: HRDATA = 32'(flags1);
            16'h0018: HRDATA = 32'(flags2);
            16'h001C: HRDATA = cycles;
            default: begin
              for (int z = 0; z < DN_LEVELS; z++)
                if (dp_off == 16'(16'h40 + 4 * z)) HRDATA = 32'($signed(thr[z]));
            end
          endcase
        end
      end
      D_RD2:   HRDATA = 32'($signed(host_rdata));
      D_ERR2:  HRESP  = HRESP_ERROR;
      default: ;
    endcase
  end

  // Only word accesses are meaningful for this slave.
  a_word_access: assert property (@(posedge clk) disable iff (!rst)
    accept |-> HSIZE == HSIZE_WORD);
endmodule
