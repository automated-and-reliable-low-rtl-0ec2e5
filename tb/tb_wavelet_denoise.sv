// tb_wavelet_denoise: fills the detail memory with random coefficients,
// runs the soft-threshold pass with different thresholds for d1 and d2 and
// compares every word with the reference: d1 and d2 shrunk toward zero by
// their own threshold, d3 and d4 untouched. The pass must take 2 cycles per
// thresholded coefficient plus one.
module tb_wavelet_denoise;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 2560, AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  coef_t thr [2];
  logic [AW-1:0] d_addr;
  logic d_we;
  coef_t d_wdata, d_rdata;
  coef_t dm [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wavelet_denoise dut (.*);

  always_ff @(posedge clk) begin
    d_rdata <= dm[d_addr];
    if (d_we) dm[d_addr] <= d_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    arr_t d;
    longint th[];
    int cyc, zeroed;
    d = new[N];
    th = new[2];
    th[0] = 300; th[1] = 1000;
    thr[0] = 24'sd300; thr[1] = 24'sd1000;
    for (int i = 0; i < N; i++) begin
      d[i] = longint'(int'($urandom_range(8000)) - 4000);
      dm[i] = coef_t'(d[i]);
    end
    denoise(d, N, th);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2 * (N/2 + N/4) + 1, $sformatf("cycles %0d", cyc));
    zeroed = 0;
    for (int i = 0; i < N; i++) begin
      check(longint'(dm[i]) == d[i], $sformatf("d[%0d] rtl=%0d ref=%0d", i, dm[i], d[i]));
      if (i < 3 * N / 4 && d[i] == 0) zeroed++;
    end
    check(zeroed > 0, "some coefficients fell below the threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
