// tb_ahb_mux: drives random slave outputs and a random sequence of selects
// with random wait states. The multiplexor must answer ready/OKAY/zero out of
// reset, then route the slave whose select was presented at the last cycle
// with HREADY high (the data-phase owner), holding that choice while HREADY
// is low. A slave that starts the two-cycle ERROR keeps its ownership into
// the second cycle.
module tb_ahb_mux;
  logic clk = 0, rst = 0;
  logic [3:0]  MUX_SEL = '0;
  logic [31:0] HRDATA_S0, HRDATA_S1, HRDATA_DEF, HRDATA;
  logic HREADYOUT_S0, HREADYOUT_S1, HREADYOUT_DEF, HRESP_S0 = 0, HRESP_S1, HRESP_DEF, HREADY, HRESP;
  int checks = 0, failures = 0, stalls = 0;
  logic [3:0] owner;
  logic err2;

  always #5 clk = ~clk;

  ahb_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    HRDATA_S0 = 32'h1; HRDATA_S1 = 32'h2; HRDATA_DEF = 32'h3;
    HREADYOUT_S0 = 0; HREADYOUT_S1 = 0; HREADYOUT_DEF = 0; HRESP_S1 = 1; HRESP_DEF = 1;
    #1;
    check(HREADY && !HRESP && HRDATA == 0, "reset: ready, OKAY, zero");
    repeat (2) @(negedge clk);
    rst = 1;
    owner = 4'd0;
    err2 = 0;
    // first edge after reset: owner becomes the presented select
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      HRDATA_S0 = $urandom; HRDATA_S1 = $urandom; HRDATA_DEF = $urandom;
      HREADYOUT_S0 = ($urandom_range(3) != 0);
      HREADYOUT_S1 = ($urandom_range(3) != 0);
      // slave 1 and the default slave give proper two-cycle errors
      HRESP_S1 = 0; HRESP_DEF = 0;
      if (err2) begin
        if (owner == 4'd1) begin HRESP_S1 = 1; HREADYOUT_S1 = 1; end
        else begin HRESP_DEF = 1; HREADYOUT_DEF = 1; end
      end else begin
        HREADYOUT_DEF = 1;
        if (owner == 4'd2 && $urandom_range(4) == 0) begin HRESP_DEF = 1; HREADYOUT_DEF = 0; end
        if (owner == 4'd1 && $urandom_range(4) == 0) begin HRESP_S1 = 1; HREADYOUT_S1 = 0; end
      end
      #1;
      if (i > 0) begin
        unique case (owner)
          4'd0: check(HRDATA == HRDATA_S0 && HREADY == HREADYOUT_S0 && HRESP == HRESP_S0, "route S0");
          4'd1: check(HRDATA == HRDATA_S1 && HREADY == HREADYOUT_S1 && HRESP == HRESP_S1, "route S1");
          default: check(HRDATA == HRDATA_DEF && HREADY == HREADYOUT_DEF && HRESP == HRESP_DEF, "route DEF");
        endcase
      end
      if (!HREADY) stalls++;
      err2 = HRESP && !HREADY;
      MUX_SEL = 4'($urandom_range(2));
      @(posedge clk);
      if (HREADY) owner = MUX_SEL;
    end
    check(stalls > 100, "stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
