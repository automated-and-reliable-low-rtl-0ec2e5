// ahb_mux: AHB-Lite slave-to-master multiplexor (AHB_MUX).
//
// Routes HRDATA, HREADYOUT and HRESP of the slave that owns the current data
// phase to the master. The decoder's select is captured at the end of each
// address phase (when HREADY is high), so the multiplexor follows the
// pipeline: the address phase of the next transfer overlaps the data phase of
// the current one. The combined HREADY goes back to the master and to every
// slave's HREADY input. Out of reset no slave owns the data phase and the bus
// reads ready/OKAY. Slave 0 is the memory, slave 1 the peripheral, slave 2
// the default slave. rst is active low (the bus reset, HRESETn).
module ahb_mux
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  MUX_SEL,
  input  logic [31:0] HRDATA_S0,
  input  logic [31:0] HRDATA_S1,
  input  logic [31:0] HRDATA_DEF,
  input  logic        HREADYOUT_S0,
  input  logic        HREADYOUT_S1,
  input  logic        HREADYOUT_DEF,
  input  logic        HRESP_S0,
  input  logic        HRESP_S1,
  input  logic        HRESP_DEF,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic        HRESP
);
  logic [3:0] sel_q;
  logic       valid_q;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      sel_q   <= '0;
      valid_q <= 1'b0;
    end else if (HREADY) begin
      sel_q   <= MUX_SEL;
      valid_q <= 1'b1;
    end
  end

  always_comb begin
    HRDATA = '0;
    HREADY = 1'b1;
    HRESP  = HRESP_OKAY;
    if (valid_q) begin
      unique case (sel_q)
        SEL_MEM:  begin HRDATA = HRDATA_S0;  HREADY = HREADYOUT_S0;  HRESP = HRESP_S0;  end
        SEL_PERI: begin HRDATA = HRDATA_S1;  HREADY = HREADYOUT_S1;  HRESP = HRESP_S1;  end
        default:  begin HRDATA = HRDATA_DEF; HREADY = HREADYOUT_DEF; HRESP = HRESP_DEF; end
      endcase
    end
  end

  // An ERROR response takes two cycles: the first with HREADY low.
  a_error_two_cycle: assert property (@(posedge clk) disable iff (!rst)
    (HRESP && !HREADY) |=> (HRESP && HREADY));
endmodule
