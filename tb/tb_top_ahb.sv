// tb_top_ahb: test of the AHB-Lite bus with its memory and peripheral, at a
// reduced record size (256 samples, 16-coefficient frames, 5-sample blink
// windows) with the testbench as the bus master.
//
// It exercises the bus first: word, halfword and byte writes to the memory
// with read-back, a run of back-to-back pipelined transfers that switches
// between the memory and the peripheral, an access to unmapped space
// (default slave ERROR) and a sample index past the record (peripheral
// ERROR). Then it runs the artefact-removal flow twice as software would:
// load a 256-sample record with a muscle burst and a blink, set the
// thresholds, start, touch the sample memory while busy (ERROR), poll
// STATUS, read the result registers and the cleaned record (each read has
// one wait state) and compare everything with the behavioural reference.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_top_ahb;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 256, LV = 4, XF = 16, WIN = 5;
  localparam logic [31:0] PERI = 32'h4000_0000;
  // Run length: forward and inverse DWT, a4 sign capture, denoising, muscle
  // and blink passes, plus one start cycle per phase.
  localparam int P = N/2 + N/4 + N/8 + N/16, S = ((N/2) + XF - 1) / XF;
  localparam int RUN_CYCLES = 2 * (3 * P + 1) + (2 * (N >> LV) + 1) + (2 * (N/2 + N/4) + 1)
                            + (3 * (N/2 + N/4) + S + 2) + (4 * N + 43) + 6;

  logic        clk = 0, rst = 0;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [2:0]  HSIZE = 3'b010;
  logic [1:0]  HTRANS = 2'b00;
  logic        HWRITE = 0, HREADY, HRESP, clk_1;
  logic [7:0]  OUT_DATA;
  int checks = 0, failures = 0;
  int n_wait = 0, n_err_def = 0, n_err_busy = 0, n_err_range = 0, n_pipelined = 0;
  int n_byte = 0, n_half = 0, n_muscle = 0, n_blink = 0, n_denoise = 0, n_outdata = 0;

  always #5 clk = ~clk;

  top_ahb #(.MEM_WORDS(256), .N(N), .LEVELS(LV), .X(XF), .WIN(WIN)) dut (.*);

  // Wait states seen on the bus (HREADY low without an error).
  always @(posedge clk) if (rst && !HREADY && !HRESP) n_wait++;
  always @(posedge clk_1 or negedge clk_1) if (rst) n_outdata++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // One non-pipelined transfer: address phase, then data phase until HREADY.
  task automatic xfer(bit wr, logic [31:0] addr, logic [2:0] size, logic [31:0] wdata,
                      output logic [31:0] rdata, output bit err);
    @(negedge clk);
    HADDR = addr; HWRITE = wr; HSIZE = size; HTRANS = 2'b10;
    do @(posedge clk); while (!HREADY);
    @(negedge clk);
    HTRANS = 2'b00; HWDATA = wdata;
    err = 0;
    forever begin
      @(posedge clk);
      if (HRESP) err = 1;
      if (HREADY) break;
    end
    rdata = HRDATA;
  endtask

  task automatic wr32(logic [31:0] a, logic [31:0] d, bit expect_err = 0);
    logic [31:0] r; bit e;
    xfer(1, a, 3'b010, d, r, e);
    check(e == expect_err, $sformatf("write %h response %0d", a, e));
  endtask

  task automatic rd32(logic [31:0] a, output logic [31:0] d, input bit expect_err = 0);
    bit e;
    xfer(0, a, 3'b010, '0, d, e);
    check(e == expect_err, $sformatf("read %h response %0d", a, e));
  endtask

  // Back-to-back transfers: address of transfer i+1 overlaps data of i.
  task automatic pipelined(logic [31:0] addrs[], bit wr[], logic [31:0] wdat[],
                           output logic [31:0] rdat[]);
    int n;
    n = addrs.size();
    rdat = new[n];
    @(negedge clk);
    HADDR = addrs[0]; HWRITE = wr[0]; HSIZE = 3'b010; HTRANS = 2'b10;
    for (int i = 0; i <= n; i++) begin
      do @(posedge clk); while (!HREADY);
      if (i > 0) rdat[i-1] = HRDATA;
      @(negedge clk);
      if (i > 0) n_pipelined++;
      HWDATA = (i < n) ? wdat[i] : '0;
      if (i + 1 < n) begin
        HADDR = addrs[i+1]; HWRITE = wr[i+1]; HTRANS = 2'b10;
      end else begin
        HTRANS = 2'b00;
      end
    end
  endtask

  task automatic bus_tests();
    logic [31:0] r, addrs[], wd[], rd[];
    bit e, wr[];
    // word, halfword and byte writes to memory
    wr32(32'h0000_0010, 32'hDEAD_BEEF);
    rd32(32'h0000_0010, r); check(r == 32'hDEAD_BEEF, $sformatf("mem word %h", r));
    xfer(1, 32'h0000_0012, 3'b001, 32'h1234_0000, r, e); n_half++;
    rd32(32'h0000_0010, r); check(r == 32'h1234_BEEF, $sformatf("mem half %h", r));
    xfer(1, 32'h0000_0011, 3'b000, 32'h0000_5A00, r, e); n_byte++;
    rd32(32'h0000_0010, r); check(r == 32'h1234_5AEF, $sformatf("mem byte %h", r));
    // pipelined: 6 memory writes, then reads interleaved with a peripheral register
    addrs = new[6]; wr = new[6]; wd = new[6];
    for (int i = 0; i < 6; i++) begin addrs[i] = 32'h100 + 4 * i; wr[i] = 1; wd[i] = 32'hA000 + i; end
    pipelined(addrs, wr, wd, rd);
    addrs = new[7]; wr = new[7]; wd = new[7];
    for (int i = 0; i < 6; i++) begin addrs[i] = 32'h100 + 4 * i; wr[i] = 0; wd[i] = 0; end
    addrs[6] = addrs[2]; addrs[2] = PERI + 32'h40; wr[6] = 0; wd[6] = 0;   // THR[0] read mid-stream
    pipelined(addrs, wr, wd, rd);
    check(rd[0] == 32'hA000 && rd[1] == 32'hA001 && rd[2] == 32'h0 && rd[3] == 32'hA003
          && rd[4] == 32'hA004 && rd[5] == 32'hA005 && rd[6] == 32'hA002,
          $sformatf("pipelined reads %p", rd));
    // unmapped space: default slave ERROR
    rd32(32'h8000_0000, r, 1); n_err_def++;
    wr32(32'h2000_0000, 32'h1, 1); n_err_def++;
    // sample index beyond the record
    rd32(PERI + 32'h8000 + 4 * N, r, 1); n_err_range++;
  endtask

  task automatic one_run(arr_t rec, longint t1, longint t2);
    arr_t x;
    longint thrs[];
    longint rgm; int rcnt, rclamp; flags_t f1, f2;
    logic [31:0] r;
    int polls;
    x = new[N](rec);
    thrs = new[2]; thrs[0] = t1; thrs[1] = t2;
    run(x, N, LV, XF, WIN, thrs, rgm, rcnt, rclamp, f1, f2);
    for (int i = 0; i < N; i++) wr32(PERI + 32'h8000 + 4 * i, 32'(rec[i]));
    wr32(PERI + 32'h40, 32'(t1));
    wr32(PERI + 32'h44, 32'(t2));
    rd32(PERI + 32'h44, r); check(r == 32'(t2), "THR[1] read back");
    wr32(PERI + 32'h0, 32'h1);
    rd32(PERI + 32'h4, r); check(r[0] == 1'b1, "busy after start");
    rd32(PERI + 32'h8000, r, 1); n_err_busy++;
    wr32(PERI + 32'h8004, 32'h7, 1); n_err_busy++;
    polls = 0;
    do begin
      repeat (200) @(posedge clk);
      rd32(PERI + 32'h4, r);
      polls++;
    end while (r[0] && polls < 1000);
    check(r[1:0] == 2'b10, $sformatf("status after run %b", r[1:0]));
    rd32(PERI + 32'h8, r);  check($signed(r) == rgm, $sformatf("GM %0d ref %0d", $signed(r), rgm));
    rd32(PERI + 32'hC, r);  check(int'(r) == rcnt, $sformatf("WIN_COUNT %0d ref %0d", r, rcnt));
    rd32(PERI + 32'h10, r); check(int'(r) == rclamp, $sformatf("CLAMPED %0d ref %0d", r, rclamp));
    if (r != 0) n_blink++;
    rd32(PERI + 32'h14, r); check(64'(r) == f1, $sformatf("FLAGS1 %h ref %h", r, f1));
    if (r != 0) n_muscle++;
    rd32(PERI + 32'h18, r); check(64'(r) == f2, $sformatf("FLAGS2 %h ref %h", r, f2));
    if (r != 0) n_muscle++;
    rd32(PERI + 32'h1C, r); check(r == 32'(RUN_CYCLES), $sformatf("CYCLES %0d, expected %0d", r, RUN_CYCLES));
    if (t1 != 0 || t2 != 0) n_denoise++;
    for (int i = 0; i < N; i++) begin
      rd32(PERI + 32'h8000 + 4 * i, r);
      check($signed(r) == x[i], $sformatf("sample %0d: %0d ref %0d", i, $signed(r), x[i]));
      if (i == N - 1) begin
        @(negedge clk);
        check(OUT_DATA == r[15:8], "OUT_DATA shows the last sample read");
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1;
    bus_tests();
    one_run(gen(N, 256, 1, 1), 0, 0);
    one_run(gen(N, 256, 1, 1), 30, 50);
    $display("mechanisms: wait=%0d err_default=%0d err_busy=%0d err_range=%0d pipelined=%0d byte=%0d half=%0d muscle=%0d blink=%0d denoise=%0d out_data=%0d",
             n_wait, n_err_def, n_err_busy, n_err_range, n_pipelined, n_byte, n_half,
             n_muscle, n_blink, n_denoise, n_outdata);
    check(n_wait > 0, "wait states");
    check(n_err_def > 0, "default-slave error");
    check(n_err_busy > 0, "busy error");
    check(n_err_range > 0, "range error");
    check(n_pipelined > 0, "pipelined transfers");
    check(n_byte > 0 && n_half > 0, "narrow writes");
    check(n_muscle > 0, "muscle frames removed");
    check(n_blink > 0, "blink samples clamped");
    check(n_denoise > 0, "denoising thresholds in use");
    check(n_outdata > 0, "OUT_DATA updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
