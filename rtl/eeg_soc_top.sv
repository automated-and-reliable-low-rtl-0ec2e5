// eeg_soc_top: top level of the EEG artefact-removal SoC.
//
// The SoC joins a 32-bit processor, on-chip memory and the artefact-removal
// co-processor on one AHB-Lite bus, so that the processor can hand a 10 s
// record of one EEG component to the co-processor and collect the cleaned
// record. This top holds the bus and both slaves (top_ahb). The processor
// itself (an ARM Cortex-M0+, licensed IP) and the FPGA clock generator are
// not part of the RTL: the processor's AHB-Lite master signals are ports of
// this top, to be driven by the processor or a bus model, and clk is the
// generated clock. The processor's other outputs (HBURST, HPROT, HMASTLOCK)
// are not used by the bus and have no ports. rst is the active-low system
// reset that also drives the processor's HRESETn.
module eeg_soc_top
  import eeg_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned N         = DEF_N,
  parameter int unsigned LEVELS    = DEF_LEVELS,
  parameter int unsigned X         = DEF_FRAME_X,
  parameter int unsigned WIN       = DEF_BLINK_WIN,
  parameter int unsigned DN_LEVELS = DEF_DN_LEVELS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] HADDR,
  input  logic [2:0]  HSIZE,
  input  logic [1:0]  HTRANS,
  input  logic [31:0] HWDATA,
  input  logic        HWRITE,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic        HRESP,
  output logic [7:0]  OUT_DATA,
  output logic        clk_1
);
  top_ahb #(.MEM_WORDS(MEM_WORDS), .N(N), .LEVELS(LEVELS), .X(X), .WIN(WIN),
            .DN_LEVELS(DN_LEVELS)) u_ahb (.*);
endmodule
