// tb_eeg_coprocessor: end-to-end check of the co-processor at its default
// size (2560-sample record). Records with a muscle burst and a blink are
// loaded through the host port, processed, read back and compared sample by
// sample with the behavioural reference in eeg_ref_pkg, together with the
// global mean, the number of window samples, the number of clamped samples
// and the muscle frame flags. A second run with no artefacts and non-zero
// denoising thresholds checks the soft-threshold path. The run length
// reported by the block is checked against its per-phase schedule.
module tb_eeg_coprocessor;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 2560, LV = 4, XF = 86, WIN = 51, S = ((N/2) + XF - 1) / XF;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  coef_t thr [2];
  logic [AW-1:0] host_addr = '0;
  logic host_we = 0;
  coef_t host_wdata = '0, host_rdata, gm;
  logic [AW:0] neg_count, clamp_count;
  logic [S-1:0] flags1, flags2;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eeg_coprocessor dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic one_run(arr_t rec, longint t1, longint t2, bit expect_artefacts);
    arr_t x;
    longint thrs[];
    longint rgm; int rcnt, rclamp; flags_t f1, f2;
    x = new[N](rec);
    thrs = new[2];
    thrs[0] = t1; thrs[1] = t2;
    run(x, N, LV, XF, WIN, thrs, rgm, rcnt, rclamp, f1, f2);
    thr[0] = coef_t'(t1); thr[1] = coef_t'(t2);
    for (int i = 0; i < N; i++) begin
      @(negedge clk); host_addr = AW'(i); host_wdata = coef_t'(rec[i]); host_we = 1;
    end
    @(negedge clk); host_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      host_addr = AW'(i);
      @(negedge clk);
      check(longint'(host_rdata) == x[i], $sformatf("sample %0d rtl=%0d ref=%0d", i, host_rdata, x[i]));
    end
    check(longint'(gm) == rgm, $sformatf("gm rtl=%0d ref=%0d", gm, rgm));
    check(int'(neg_count) == rcnt, $sformatf("neg_count rtl=%0d ref=%0d", neg_count, rcnt));
    check(int'(clamp_count) == rclamp, $sformatf("clamp rtl=%0d ref=%0d", clamp_count, rclamp));
    check(flags1 == S'(f1), $sformatf("flags1 rtl=%h ref=%h", flags1, f1));
    check(flags2 == S'(f2), $sformatf("flags2 rtl=%h ref=%h", flags2, f2));
    // Run length from the per-phase schedule: two transforms of 3P+1
    // cycles, the a4 sign capture, 2 cycles per denoised and 3 per muscle
    // coefficient, blink removal (4N+43, or 2N+2 with no window sample)
    // and the phase hand-overs.
    begin
      int p, m, ecyc;
      p = N/2 + N/4 + N/8 + N/16;
      m = N/2 + N/4;
      ecyc = 2*(3*p + 1) + (2*(N >> LV) + 1) + (2*m + 1) + (3*m + S + 2)
           + ((rcnt != 0) ? 4*N + 43 : 2*N + 2) + 6;
      check(int'(cycles) == ecyc, $sformatf("cycles rtl=%0d expected=%0d", cycles, ecyc));
    end
    if (expect_artefacts) begin
      check(flags1 != '0, "a muscle frame was detected");
      check(clamp_count != '0, "blink samples were clamped");
    end
    $display("run: cycles=%0d gm=%0d window_neg=%0d clamped=%0d flags1=%h flags2=%h",
             cycles, gm, neg_count, clamp_count, flags1, flags2);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(gen(N, 256, 1, 1), 0, 0, 1);
    one_run(gen(N, 256, 0, 0), 40, 60, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
