// tb_haar_dwt: checks the Haar engine against the reference transform.
// A random 2560-sample record is decomposed (4 levels) and the level-4
// approximation and every detail band are compared; the forward run must take
// exactly 3 cycles per butterfly plus one. The inverse of the unchanged
// decomposition must give back the record, and the inverse after some detail
// coefficients are cleared must match the reference reconstruction.
module tb_haar_dwt;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 2560, LV = 4, AW = $clog2(N);
  localparam int PAIRS = N/2 + N/4 + N/8 + N/16;

  logic clk = 0, rst_n = 0, start = 0, inverse = 0, busy, done;
  logic [AW-1:0] x_addr, d_addr;
  logic x_we, d_we;
  coef_t x_wdata, d_wdata, x_rdata, d_rdata;
  coef_t xm [N];
  coef_t dm [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  haar_dwt dut (.*);

  always_ff @(posedge clk) begin
    x_rdata <= xm[x_addr];
    d_rdata <= dm[d_addr];
    if (x_we) xm[x_addr] <= x_wdata;
    if (d_we) dm[d_addr] <= d_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic go(bit inv_mode, output int cyc);
    @(negedge clk); inverse = inv_mode; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
  endtask

  initial begin
    arr_t rec, x, d;
    int cyc;
    rec = new[N]; x = new[N]; d = new[N];
    for (int i = 0; i < N; i++) begin
      rec[i] = longint'(int'($urandom_range(65535)) - 32768);
      x[i] = rec[i]; d[i] = 0;
      xm[i] = coef_t'(rec[i]); dm[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    fwd(x, d, N, LV);
    go(0, cyc);
    check(cyc == 3 * PAIRS + 1, $sformatf("forward cycles %0d, expected %0d", cyc, 3 * PAIRS + 1));
    for (int i = 0; i < (N >> LV); i++) check(longint'(xm[i]) == x[i], $sformatf("a4[%0d]", i));
    for (int i = 0; i < N - (N >> LV); i++) check(longint'(dm[i]) == d[i], $sformatf("d[%0d] rtl=%0d ref=%0d", i, dm[i], d[i]));
    go(1, cyc);
    check(cyc == 3 * PAIRS + 1, $sformatf("inverse cycles %0d", cyc));
    for (int i = 0; i < N; i++) check(longint'(xm[i]) == rec[i], $sformatf("restored[%0d] rtl=%0d ref=%0d", i, xm[i], rec[i]));
    // decompose again, clear part of d1 and d3, reconstruct
    for (int i = 0; i < N; i++) begin x[i] = rec[i]; d[i] = 0; end
    fwd(x, d, N, LV);
    go(0, cyc);
    for (int i = 100; i < 300; i++) begin d[i] = 0; dm[i] = '0; end
    for (int i = dof(N, 3); i < dof(N, 3) + 50; i++) begin d[i] = 0; dm[i] = '0; end
    inv(x, d, N, LV);
    go(1, cyc);
    for (int i = 0; i < N; i++) check(longint'(xm[i]) == x[i], $sformatf("recon[%0d] rtl=%0d ref=%0d", i, xm[i], x[i]));
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
