// ahb_default_slave: answers accesses to addresses no slave decodes.
//
// NONSEQ and SEQ transfers get the two-cycle ERROR response (HREADYOUT low
// with HRESP high, then HREADYOUT high with HRESP high); IDLE and BUSY
// transfers get a zero-wait OKAY. Reads return zero. rst is active low.
module ahb_default_slave
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        HSEL,
  input  logic [1:0]  HTRANS,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP
);
  typedef enum logic [1:0] {D_OKAY, D_ERR1, D_ERR2} dstate_t;
  dstate_t st;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) st <= D_OKAY;
    else if (st == D_ERR1) st <= D_ERR2;
    else if (HREADY && HSEL && HTRANS[1]) st <= D_ERR1;
    else if (HREADY) st <= D_OKAY;
  end

  assign HRDATA    = '0;
  assign HREADYOUT = (st != D_ERR1);
  assign HRESP     = (st == D_OKAY) ? HRESP_OKAY : HRESP_ERROR;
endmodule
