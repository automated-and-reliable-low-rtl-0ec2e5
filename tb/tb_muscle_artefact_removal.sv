// tb_muscle_artefact_removal: builds detail bands with a few high-power
// frames (a level-1 burst, a level-2 burst, one burst that crosses a frame
// boundary, and one in the short last frame), runs the block and compares the
// frame flags and every detail word with the reference, which computes the
// mean of the frame maxima as a real number. Also checks the cycle count
// 3*(N/2 + N/4) + S + 2 and that d3/d4 are left alone.
module tb_muscle_artefact_removal;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int N = 2560, XF = 86, S = ((N/2) + XF - 1) / XF, AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [S-1:0] flags1, flags2;
  logic [AW-1:0] d_addr;
  logic d_we;
  coef_t d_wdata, d_rdata;
  coef_t dm [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  muscle_artefact_removal dut (.*);

  always_ff @(posedge clk) begin
    d_rdata <= dm[d_addr];
    if (d_we) dm[d_addr] <= d_wdata;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic one(int seed_amp);
    arr_t d;
    flags_t f1, f2;
    int cyc;
    d = new[N];
    for (int i = 0; i < N; i++) begin
      d[i] = longint'(int'($urandom_range(400)) - 200);
      if (i >= 3 * XF && i < 4 * XF) d[i] *= seed_amp;            // d1 frame 3
      if (i >= 9 * XF - 20 && i < 9 * XF + 20) d[i] *= 6;         // d1 frames 8/9
      if (i >= 14 * XF && i < N / 2) d[i] *= 5;                   // d1 short frame
      if (i >= N/2 + 6 * (XF/2) && i < N/2 + 7 * (XF/2)) d[i] *= seed_amp + 2; // d2 frame 6
      dm[i] = coef_t'(d[i]);
    end
    muscle(d, N, XF, f1, f2);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3 * (N/2 + N/4) + S + 2, $sformatf("cycles %0d", cyc));
    check(flags1 == S'(f1), $sformatf("flags1 rtl=%h ref=%h", flags1, f1));
    check(flags2 == S'(f2), $sformatf("flags2 rtl=%h ref=%h", flags2, f2));
    check(flags1 != '0 && flags2 != '0, "frames of both levels flagged");
    for (int i = 0; i < N; i++)
      check(longint'(dm[i]) == d[i], $sformatf("d[%0d] rtl=%0d ref=%0d", i, dm[i], d[i]));
    $display("flags1=%h flags2=%h", flags1, flags2);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(8);
    one(4);
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
