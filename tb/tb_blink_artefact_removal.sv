// tb_blink_artefact_removal: gives the block a set of level-4 approximation
// signs (a few negatives, including the first and last positions and two
// neighbours whose windows overlap), then a random record with a blink-like
// dip, and compares the global mean, the number of window samples, the
// number of clamped samples and every output sample with the reference.
// Also checks the capture and removal cycle counts and the case where no
// approximation coefficient is negative (record left untouched).
module tb_blink_artefact_removal;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 2560, LV = 4, WIN = 51, M = N >> LV, AW = $clog2(N);

  logic clk = 0, rst_n = 0, start_capture = 0, start_remove = 0, busy, done;
  coef_t gm;
  logic [AW:0] neg_count, clamp_count;
  logic [AW-1:0] x_addr;
  logic x_we;
  coef_t x_wdata, x_rdata;
  coef_t xm [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  blink_artefact_removal dut (.*);

  always_ff @(posedge clk) begin
    x_rdata <= xm[x_addr];
    if (x_we) xm[x_addr] <= x_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic pulse(bit cap, output int cyc);
    @(negedge clk);
    if (cap) start_capture = 1; else start_remove = 1;
    @(negedge clk); start_capture = 0; start_remove = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic one(bit any_neg);
    bit neg[];
    arr_t x;
    longint rgm; int rcnt, rclamp, cyc;
    neg = new[M];
    foreach (neg[m]) neg[m] = 0;
    if (any_neg) begin
      neg[0] = 1; neg[M-1] = 1; neg[40] = 1; neg[43] = 1; neg[96] = 1; neg[97] = 1;
    end
    for (int m = 0; m < M; m++)
      xm[m] = neg[m] ? -coef_t'($urandom_range(5000) + 1) : coef_t'($urandom_range(5000));
    pulse(1, cyc);
    check(cyc == 2 * M + 1, $sformatf("capture cycles %0d", cyc));
    x = new[N];
    for (int t = 0; t < N; t++) begin
      x[t] = longint'(int'($urandom_range(1000)) - 500);
      if (t >= 1530 && t < 1600) x[t] -= 3000;
      xm[t] = coef_t'(x[t]);
    end
    blink(x, neg, N, LV, WIN, rgm, rcnt, rclamp);
    pulse(0, cyc);
    if (any_neg) check(cyc == 4 * N + 43, $sformatf("remove cycles %0d", cyc));
    else         check(cyc == 2 * N + 2, $sformatf("remove cycles %0d", cyc));
    check(longint'(gm) == rgm, $sformatf("gm rtl=%0d ref=%0d", gm, rgm));
    check(int'(neg_count) == rcnt, $sformatf("count rtl=%0d ref=%0d", neg_count, rcnt));
    check(int'(clamp_count) == rclamp, $sformatf("clamped rtl=%0d ref=%0d", clamp_count, rclamp));
    if (any_neg) check(rclamp > 0, "some samples clamped");
    for (int t = 0; t < N; t++)
      check(longint'(xm[t]) == x[t], $sformatf("x[%0d] rtl=%0d ref=%0d", t, xm[t], x[t]));
    $display("gm=%0d count=%0d clamped=%0d", gm, neg_count, clamp_count);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(1);
    one(0);
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
