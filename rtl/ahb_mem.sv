// ahb_mem: AHB-Lite on-chip memory slave (AHB_MEM).
//
// WORDS x 32-bit little-endian memory with zero-wait reads and writes. The
// address phase (HSEL, HTRANS NONSEQ/SEQ, HREADY high) is registered; in the
// data phase a write stores the byte lanes that HSIZE and the low address
// bits select, and a read returns the whole addressed word. A read that
// directly follows a write to the same word sees the new value. The memory
// is sized by WORDS (1024 words, 4 KB, by default: the size is this design's
// choice) and its contents are not reset. HREADYOUT is always high; the
// memory never errors, so it has no HRESP output (the bus ties it to OKAY).
// rst is active low.
module ahb_mem
  import ahb_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
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
  output logic        HREADYOUT
);
  logic [31:0]   mem [WORDS];
  logic          dp_write;
  logic [AW-1:0] dp_word;
  logic [3:0]    dp_lanes;
  logic [3:0]    lanes;

  // Byte lanes of the transfer being accepted.
  always_comb begin
    unique case (HSIZE)
      HSIZE_BYTE: lanes = 4'b0001 << HADDR[1:0];
      HSIZE_HALF: lanes = HADDR[1] ? 4'b1100 : 4'b0011;
      default:    lanes = 4'b1111;
    endcase
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      dp_write <= 1'b0;
      dp_word  <= '0;
      dp_lanes <= '0;
    end else if (HREADY) begin
      dp_write <= HSEL && HTRANS[1] && HWRITE;
      dp_word  <= HADDR[AW+1:2];
      dp_lanes <= lanes;
    end
  end

  always_ff @(posedge clk) begin
    if (dp_write)
      for (int b = 0; b < 4; b++)
        if (dp_lanes[b]) mem[dp_word][8*b +: 8] <= HWDATA[8*b +: 8];
  end

  assign HRDATA    = mem[dp_word];
  assign HREADYOUT = 1'b1;
endmodule
