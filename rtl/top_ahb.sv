// top_ahb: the AHB-Lite bus of the SoC with its two slaves.
//
// One master (the processor, outside this block) drives HADDR, HSIZE,
// HTRANS, HWDATA and HWRITE to every slave. ahb_decoder turns HADDR into the
// slave selects and the multiplexor select; ahb_mux returns the read data,
// ready and response of the slave that owns the data phase, and its HREADY
// goes both to the master and back to every slave. The slaves are the
// on-chip memory (ahb_mem, slave 0) and the artefact-removal peripheral
// (ahb_peripheral, slave 1); a default slave (ahb_default_slave) answers the
// rest of the address space with ERROR, as AHB-Lite asks of a partly filled
// memory map. The memory never errors, so its response is tied to OKAY.
// OUT_DATA and clk_1 come from the peripheral. rst is active low.
module top_ahb
  import ahb_pkg::*;
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
  logic        hsel_s0, hsel_s1, hsel_def;
  logic [3:0]  mux_sel;
  logic [31:0] hrdata_s0, hrdata_s1, hrdata_def;
  logic        hreadyout_s0, hreadyout_s1, hreadyout_def;
  logic        hresp_s1, hresp_def;

  ahb_decoder u_dcd (
    .HADDR, .HSEL_S0(hsel_s0), .HSEL_S1(hsel_s1), .HSEL_DEF(hsel_def), .MUX_SEL(mux_sel)
  );

  ahb_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .rst, .HADDR, .HSIZE, .HTRANS, .HWDATA, .HWRITE,
    .HSEL(hsel_s0), .HREADY, .HRDATA(hrdata_s0), .HREADYOUT(hreadyout_s0)
  );

  ahb_peripheral #(.N(N), .LEVELS(LEVELS), .X(X), .WIN(WIN), .DN_LEVELS(DN_LEVELS)) u_peri (
    .clk, .rst, .HADDR, .HSIZE, .HTRANS, .HWDATA, .HWRITE,
    .HSEL(hsel_s1), .HREADY, .HRDATA(hrdata_s1), .HREADYOUT(hreadyout_s1), .HRESP(hresp_s1),
    .OUT_DATA, .clk_1
  );

  ahb_default_slave u_def (
    .clk, .rst, .HSEL(hsel_def), .HTRANS, .HREADY,
    .HRDATA(hrdata_def), .HREADYOUT(hreadyout_def), .HRESP(hresp_def)
  );

  ahb_mux u_mux (
    .clk, .rst, .MUX_SEL(mux_sel),
    .HRDATA_S0(hrdata_s0), .HRDATA_S1(hrdata_s1), .HRDATA_DEF(hrdata_def),
    .HREADYOUT_S0(hreadyout_s0), .HREADYOUT_S1(hreadyout_s1), .HREADYOUT_DEF(hreadyout_def),
    .HRESP_S0(HRESP_OKAY), .HRESP_S1(hresp_s1), .HRESP_DEF(hresp_def),
    .HRDATA, .HREADY, .HRESP
  );
endmodule
