// eeg_pkg: constants and helper functions shared by the EEG artefact-removal
// co-processor and its AHB-Lite wrapper.
//
// Sizes that come from the method: a 10 s record at 256 Hz (2560 samples),
// 16-bit input words, a four-level Haar decomposition (the level-4 approximation
// covers the theta band at 256 Hz), 86 level-1 detail coefficients per muscle
// frame and a +/-0.2 s blink window (51 samples at 256 Hz). Coefficient words
// are wider than the samples because the integer Haar transform used here
// (sum/difference without the 1/sqrt(2) factor) grows by one bit per level;
// 24 bits is this design's own choice.
package eeg_pkg;

  parameter int unsigned DEF_SAMPLE_W = 16;     // input word length n
  parameter int unsigned COEF_W   = 24;     // coefficient memory word
  parameter int unsigned DEF_N   = 2560;   // F*T = 256 Hz * 10 s
  parameter int unsigned DEF_LEVELS = 4;      // DWT depth
  parameter int unsigned DEF_FRAME_X  = 86;     // level-1 detail coefficients per frame
  parameter int unsigned DEF_BLINK_WIN = 51;    // 0.2 s at 256 Hz, in samples
  parameter int unsigned DEF_DN_LEVELS = 2;     // detail levels that are soft thresholded

  typedef logic signed [COEF_W-1:0] coef_t;

  // Offset of the level-z detail band in the detail memory: d1 occupies
  // [0, N/2), d2 [N/2, 3N/4), ... i.e. offset = N - N/2^(z-1).
  function automatic int unsigned d_offset(int unsigned n, int unsigned z);
    return n - (n >> (z - 1));
  endfunction

  // Soft threshold: sign(d) * max(|d| - thr, 0).
  function automatic coef_t soft_thr(coef_t d, coef_t thr);
    coef_t mag;
    mag = d[COEF_W-1] ? -d : d;
    if (mag <= thr) return '0;
    return d[COEF_W-1] ? -(mag - thr) : (mag - thr);
  endfunction

endpackage
