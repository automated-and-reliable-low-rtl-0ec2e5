// tb_eeg_workloads: runs the co-processor on the set of test records the
// method is evaluated with, in every configuration of the default build and
// of its documented variations that the RTL supports.
//
// Configurations (one co-processor instance each, all running in parallel):
//   cfg 0      default: 2560 samples (10 s at 256 Hz), 86-sample frames
//   cfg 1..6   frame-size sweep x = 4, 10, 20, 66, 122, 170 at 2560 samples
//              (86 is cfg 0; odd sizes 33, 43, 107 cannot be built because
//              the level-2 frame holds x/2 coefficients)
//   cfg 7      10 s at 160 Hz: 1600 samples, blink window 0.2 s = 32 samples
// Records: synthetic EEG (two rhythms and noise) with artefacts added in the
// patterns of the evaluation cases:
//   I    none                     VI   muscle alternate, blink same seconds
//   II   muscle alternate         VII  muscle alternate, blink other seconds
//   III  muscle random            VIII muscle alternate, blink random
//   IV   blink only               IX   muscle random, blink random
//   V    muscle random, blink alternate
// "Alternate" puts a 0.5 s muscle burst or a 0.4 s blink in every second
// second; "random" puts three of them at random places. cfg 0 runs all nine
// cases, the sweep runs II and III, cfg 7 runs I and IX.
//
// Each run is compared sample by sample with eeg_ref_pkg, together with GM,
// the window count, the clamp count, the frame flags and the run length
// (per-phase schedule). Cases with artefacts must flag a muscle frame or
// clamp a sample respectively. The correlation of input and output with the
// clean record is printed for information only.
module tb_eeg_workloads;
  import eeg_pkg::*;
  import eeg_ref_pkg::*;

  localparam int NCFG = 8;
  localparam int CFG_N   [NCFG] = '{2560, 2560, 2560, 2560, 2560, 2560, 2560, 1600};
  localparam int CFG_FS  [NCFG] = '{256,  256,  256,  256,  256,  256,  256,  160};
  localparam int CFG_X   [NCFG] = '{86,   4,    10,   20,   66,   122,  170,  86};
  localparam int CFG_WIN [NCFG] = '{51,   51,   51,   51,   51,   51,   51,   32};
  localparam int LV = 4;

  // muscle pattern: 0 none, 1 alternate, 2 random
  // blink pattern:  0 none, 1 alternate (odd seconds), 2 alternate (even
  //                 seconds), 3 random
  localparam int CASE_M [9] = '{0, 1, 2, 0, 2, 1, 1, 1, 2};
  localparam int CASE_B [9] = '{0, 0, 0, 2, 2, 1, 2, 3, 3};

  logic clk = 0;
  int checks = 0, failures = 0, cfg_done = 0;
  int n_runs = 0, n_muscle = 0, n_blink = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic string roman(int c);
    string r[9] = '{"I", "II", "III", "IV", "V", "VI", "VII", "VIII", "IX"};
    return r[c];
  endfunction

  // Clean synthetic record and the same record with artefacts added.
  function automatic void make_case(int n, int fs, int mp, int bp,
                                    output arr_t clean, output arr_t noisy);
    real pi, v;
    int secs, pos;
    bit mus[], blk[];
    pi = 3.14159265358979;
    secs = n / fs;
    clean = new[n]; noisy = new[n];
    mus = new[n]; blk = new[n];
    foreach (mus[t]) begin mus[t] = 0; blk[t] = 0; end
    // burst starts, in samples
    for (int s = 0; s < secs; s++) begin
      if (mp == 1 && (s % 2) == 1)
        for (int t = s * fs; t < s * fs + fs / 2; t++) mus[t] = 1;
      if ((bp == 1 && (s % 2) == 1) || (bp == 2 && (s % 2) == 0 && s > 0))
        for (int t = s * fs + fs / 4; t < s * fs + fs / 4 + (2 * fs) / 5; t++) blk[t] = 1;
    end
    for (int k = 0; k < 3; k++) begin
      if (mp == 2) begin
        pos = int'($urandom_range(n - fs / 2 - 1));
        for (int t = pos; t < pos + fs / 2; t++) mus[t] = 1;
      end
      if (bp == 3) begin
        pos = int'($urandom_range(n - (2 * fs) / 5 - 1));
        for (int t = pos; t < pos + (2 * fs) / 5; t++) blk[t] = 1;
      end
    end
    for (int t = 0; t < n; t++) begin
      v = 300.0 * $sin(2.0 * pi * 10.0 * t / fs) + 150.0 * $sin(2.0 * pi * 5.0 * t / fs)
        + real'(int'($urandom_range(200)) - 100);
      clean[t] = longint'(v);
      if (mus[t]) v += ((t % 2) != 0 ? 1.0 : -1.0) * real'(1200 + int'($urandom_range(600)));
      // a blink: half-sine dip of 0.4 s, placed by the run of blk[] it is in
      if (blk[t]) begin
        int st;
        st = t;
        while (st > 0 && blk[st - 1]) st--;
        v -= 4000.0 * $sin(pi * real'(t - st) / real'((2 * fs) / 5));
      end
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      noisy[t] = longint'(v);
    end
  endfunction

  function automatic real corr(arr_t a, arr_t b);
    real ma, mb, sab, saa, sbb;
    ma = 0; mb = 0; sab = 0; saa = 0; sbb = 0;
    foreach (a[i]) begin ma += real'(a[i]); mb += real'(b[i]); end
    ma /= a.size(); mb /= b.size();
    foreach (a[i]) begin
      sab += (real'(a[i]) - ma) * (real'(b[i]) - mb);
      saa += (real'(a[i]) - ma) ** 2;
      sbb += (real'(b[i]) - mb) ** 2;
    end
    return sab / $sqrt(saa * sbb);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int N   = CFG_N[g];
    localparam int FS  = CFG_FS[g];
    localparam int XF  = CFG_X[g];
    localparam int WN  = CFG_WIN[g];
    localparam int S   = ((N / 2) + XF - 1) / XF;
    localparam int AW  = $clog2(N);

    logic rst_n = 0, start = 0, busy, done, host_we = 0;
    coef_t thr [2];
    logic [AW-1:0] host_addr = '0;
    coef_t host_wdata = '0, host_rdata, gm;
    logic [AW:0] neg_count, clamp_count;
    logic [S-1:0] flags1, flags2;
    logic [31:0] cycles;

    eeg_coprocessor #(.N(N), .LEVELS(LV), .X(XF), .WIN(WN)) dut (
      .clk, .rst_n, .start, .busy, .done, .thr, .host_addr, .host_we, .host_wdata,
      .host_rdata, .gm, .neg_count, .clamp_count, .flags1, .flags2, .cycles);

    task automatic one(int c);
      arr_t clean, noisy, x;
      longint thrs[];
      longint rgm; int rcnt, rclamp; flags_t f1, f2;
      int p, m, ecyc;
      make_case(N, FS, CASE_M[c], CASE_B[c], clean, noisy);
      x = new[N](noisy);
      thrs = new[2];
      thrs[0] = 64; thrs[1] = 64;
      run(x, N, LV, XF, WN, thrs, rgm, rcnt, rclamp, f1, f2);
      thr[0] = coef_t'(thrs[0]); thr[1] = coef_t'(thrs[1]);
      for (int i = 0; i < N; i++) begin
        @(negedge clk); host_addr = AW'(i); host_wdata = coef_t'(noisy[i]); host_we = 1;
      end
      @(negedge clk); host_we = 0; start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      begin
        arr_t y;
        int bad;
        y = new[N];
        bad = 0;
        for (int i = 0; i < N; i++) begin
          host_addr = AW'(i);
          @(negedge clk);
          y[i] = longint'(host_rdata);
          if (y[i] != x[i]) begin
            bad++;
            if (bad < 4) $display("FAIL cfg%0d case %s sample %0d rtl=%0d ref=%0d",
                                  g, roman(c), i, y[i], x[i]);
          end
        end
        check(bad == 0, $sformatf("cfg%0d case %s: %0d samples differ", g, roman(c), bad));
        $display("cfg%0d N=%0d x=%0d case %-4s corr(in,clean)=%6.4f corr(out,clean)=%6.4f flags1=%0d flags2=%0d clamped=%0d",
                 g, N, XF, roman(c), corr(noisy, clean), corr(y, clean),
                 $countones(flags1), $countones(flags2), clamp_count);
      end
      check(longint'(gm) == rgm, $sformatf("cfg%0d case %s gm rtl=%0d ref=%0d", g, roman(c), gm, rgm));
      check(int'(neg_count) == rcnt, $sformatf("cfg%0d case %s neg_count", g, roman(c)));
      check(int'(clamp_count) == rclamp, $sformatf("cfg%0d case %s clamp_count", g, roman(c)));
      check(flags1 == S'(f1), $sformatf("cfg%0d case %s flags1", g, roman(c)));
      check(flags2 == S'(f2), $sformatf("cfg%0d case %s flags2", g, roman(c)));
      p = N/2 + N/4 + N/8 + N/16;
      m = N/2 + N/4;
      ecyc = 2*(3*p + 1) + (2*(N >> LV) + 1) + (2*m + 1) + (3*m + S + 2)
           + ((rcnt != 0) ? 4*N + 43 : 2*N + 2) + 6;
      check(int'(cycles) == ecyc, $sformatf("cfg%0d case %s cycles %0d, expected %0d",
                                            g, roman(c), cycles, ecyc));
      if (CASE_M[c] != 0) begin
        check(flags1 != '0 || flags2 != '0, $sformatf("cfg%0d case %s muscle found", g, roman(c)));
        if (flags1 != '0 || flags2 != '0) n_muscle++;
      end
      if (CASE_B[c] != 0) begin
        check(clamp_count != '0, $sformatf("cfg%0d case %s blink clamped", g, roman(c)));
        if (clamp_count != '0) n_blink++;
      end
      n_runs++;
    endtask

    initial begin
      repeat (3) @(negedge clk);
      rst_n = 1;
      if (g == 0)
        for (int c = 0; c < 9; c++) one(c);
      else if (g == NCFG - 1) begin
        one(0); one(8);
      end else begin
        one(1); one(2);
      end
      cfg_done++;
    end
  end

  initial begin
    wait (cfg_done == NCFG);
    check(n_runs == 9 + 2 * (NCFG - 2) + 2, "every run completed");
    $display("runs=%0d with muscle removed=%0d with blink clamped=%0d", n_runs, n_muscle, n_blink);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
