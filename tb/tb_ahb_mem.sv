// tb_ahb_mem: random byte, halfword and word writes and word reads through
// an AHB-Lite master model, issued back to back (pipelined) with random idle
// cycles and unselected transfers, checked against a byte-array model of the
// memory. Unselected and IDLE transfers must not write; HREADYOUT stays high.
module tb_ahb_mem;
  localparam int WORDS = 64;
  logic clk = 0, rst = 0;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [2:0] HSIZE = 3'b010;
  logic [1:0] HTRANS = 2'b00;
  logic HWRITE = 0, HSEL = 0, HREADY, HREADYOUT;
  logic [7:0] model [4 * WORDS];
  int checks = 0, failures = 0, n_byte = 0, n_half = 0, n_word = 0, n_rd = 0;

  always #5 clk = ~clk;
  assign HREADY = HREADYOUT;

  ahb_mem #(.WORDS(WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    // data-phase bookkeeping: the transfer whose data phase is the next cycle
    bit          dp_valid, dp_write;
    logic [31:0] dp_addr, dp_wdata;
    logic [2:0]  dp_size;
    dp_valid = 0; dp_write = 0; dp_addr = '0; dp_wdata = '0; dp_size = '0;
    repeat (2) @(negedge clk);
    rst = 1;
    for (int w = 0; w < WORDS; w++) for (int b = 0; b < 4; b++) model[4*w+b] = 8'h00;
    for (int i = 0; i < 4000 + WORDS; i++) begin
      logic [31:0] a, d;
      logic [2:0] sz;
      bit wr, sel, act;
      if (i < WORDS) begin
        a = 32'(4 * i); sz = 3'b010; wr = 1; sel = 1; act = 1;
      end else begin
        sz  = 3'($urandom_range(2));
        a   = 32'($urandom_range(4 * WORDS - 1));
        a   = (sz == 3'b010) ? {a[31:2], 2'b00} : (sz == 3'b001) ? {a[31:1], 1'b0} : a;
        wr  = $urandom_range(1);
        sel = ($urandom_range(7) != 0);
        act = ($urandom_range(5) != 0);
      end
      d = $urandom;
      @(negedge clk);
      // data phase of the previous transfer
      check(HREADYOUT == 1'b1, "zero wait");
      if (dp_valid && !dp_write) begin
        logic [31:0] exp;
        logic [31:0] wa;
        wa = {dp_addr[31:2], 2'b00};
        exp = {model[wa+3], model[wa+2], model[wa+1], model[wa]};
        check(HRDATA == exp, $sformatf("read %h: %h expected %h", dp_addr, HRDATA, exp));
        n_rd++;
      end
      HWDATA = dp_wdata;
      // address phase of the new one
      HADDR = a; HSIZE = sz; HWRITE = wr; HSEL = sel; HTRANS = act ? 2'b10 : 2'b00;
      @(posedge clk);
      if (dp_valid && dp_write) begin
        unique case (dp_size)
          3'b000: begin model[dp_addr] = dp_wdata[8*dp_addr[1:0] +: 8]; n_byte++; end
          3'b001: begin
            model[dp_addr]   = dp_wdata[8*dp_addr[1:0] +: 8];
            model[dp_addr+1] = dp_wdata[8*(dp_addr[1:0]+1) +: 8];
            n_half++;
          end
          default: begin for (int b = 0; b < 4; b++) model[dp_addr+b] = dp_wdata[8*b +: 8]; n_word++; end
        endcase
      end
      dp_valid = sel && act; dp_write = wr; dp_addr = a; dp_size = sz; dp_wdata = d;
    end
    check(n_byte > 0 && n_half > 0 && n_word > 0 && n_rd > 0, "all transfer kinds");
    $display("byte=%0d half=%0d word=%0d reads=%0d", n_byte, n_half, n_word, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
