// ahb_decoder: AHB-Lite address decoder (AHB_DECODER).
//
// A purely combinational decode of the high-order address bits HADDR[31:28]
// into one slave select per slave and the select value for the read-data
// multiplexor. Region 0x0 selects the memory (HSEL_S0), region 0x4 the
// artefact-removal peripheral (HSEL_S1), any other region the default slave
// (HSEL_DEF). MUX_SEL carries the slave number (ahb_pkg::SEL_*); the
// multiplexor registers it for the data phase. The region boundaries are
// this design's choice; slaves sample HSEL only while HREADY is high.
module ahb_decoder
  import ahb_pkg::*;
(
  input  logic [31:0] HADDR,
  output logic        HSEL_S0,
  output logic        HSEL_S1,
  output logic        HSEL_DEF,
  output logic [3:0]  MUX_SEL
);
  always_comb begin
    HSEL_S0  = 1'b0;
    HSEL_S1  = 1'b0;
    HSEL_DEF = 1'b0;
    unique case (HADDR[31:28])
      REGION_MEM:  begin HSEL_S0 = 1'b1; MUX_SEL = SEL_MEM;  end
      REGION_PERI: begin HSEL_S1 = 1'b1; MUX_SEL = SEL_PERI; end
      default:     begin HSEL_DEF = 1'b1; MUX_SEL = SEL_DEF; end
    endcase
  end
endmodule
