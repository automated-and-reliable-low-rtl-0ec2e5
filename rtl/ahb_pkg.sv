// ahb_pkg: AMBA 3 AHB-Lite encodings and the address map of this SoC.
//
// HTRANS, HSIZE and HRESP values are those of the AHB-Lite protocol. The
// address map is this design's own choice (the bus is described without
// one): the on-chip memory answers at 0x0000_0000-0x0FFF_FFFF (4 KB, aliased
// across the region), the artefact-removal peripheral at
// 0x4000_0000-0x4FFF_FFFF, and a default slave answers everything else with
// the two-cycle ERROR response.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  typedef enum logic [2:0] {
    HSIZE_BYTE  = 3'b000,
    HSIZE_HALF  = 3'b001,
    HSIZE_WORD  = 3'b010
  } hsize_t;

  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  // Multiplexor select values driven by the decoder.
  localparam logic [3:0] SEL_MEM  = 4'd0;
  localparam logic [3:0] SEL_PERI = 4'd1;
  localparam logic [3:0] SEL_DEF  = 4'd2;

  localparam logic [3:0] REGION_MEM  = 4'h0;   // HADDR[31:28]
  localparam logic [3:0] REGION_PERI = 4'h4;

endpackage
