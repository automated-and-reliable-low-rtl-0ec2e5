// tb_ahb_decoder: random and corner addresses in every 256 MB region; the
// selects must be one-hot and match the address map (region 0x0 memory,
// 0x4 peripheral, anything else the default slave), with MUX_SEL naming the
// same slave.
module tb_ahb_decoder;
  logic [31:0] HADDR;
  logic HSEL_S0, HSEL_S1, HSEL_DEF;
  logic [3:0] MUX_SEL;
  int checks = 0, failures = 0;

  ahb_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] reg_n;
      reg_n = 4'(i % 16);
      HADDR = {reg_n, 28'($urandom)};
      if (i < 32) HADDR = {reg_n, (i & 1) ? 28'hFFF_FFFF : 28'h0};
      #1;
      check($onehot({HSEL_S0, HSEL_S1, HSEL_DEF}), "one select");
      check(HSEL_S0 == (reg_n == 4'h0), $sformatf("S0 for %h", HADDR));
      check(HSEL_S1 == (reg_n == 4'h4), $sformatf("S1 for %h", HADDR));
      check(MUX_SEL == (reg_n == 4'h0 ? 4'd0 : reg_n == 4'h4 ? 4'd1 : 4'd2),
            $sformatf("MUX_SEL %0d for %h", MUX_SEL, HADDR));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
