// coef_ram: single-port coefficient memory of the co-processor.
//
// One read/write port; a write stores wdata at addr on the clock edge, a read
// returns mem[addr] on rdata one cycle after the address is presented (the
// output register of an FPGA block RAM). The read is read-first: a write and a
// read of the same address in one cycle return the old word. The contents are
// not reset; every word is written before it is read in normal operation.
module coef_ram #(
  parameter int unsigned DEPTH = 2560,
  parameter int unsigned W     = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
