// tb_sdm_sc_top: end-to-end testbench of the SDM-SC filter at its default
// sizes (m = k = 15, c = 16, M = 5, s = 1).
//
// The five-tap filter with bipolar weights 0.7 0.6 0.9 0.6 0.7 is fed a
// sine of amplitude 0.99 whose period is 2 * OSR input samples, i.e. a
// tone at f_B sampled at f_s = 2 * OSR * f_B, for OSR = 32, 64, 128, 256,
// 512 and 1024. Each run lasts one LFSR period, N = 2^15 clocks.
//
// Checks:
//  - every clock, v, z, the modulator register and the LFSR word against a
//    cycle-accurate model written independently of the RTL;
//  - the amplitude of the bipolar output 2 * z - 5 at the input frequency
//    (a single-bin DFT over the N samples) against A * |H(f_B)|, where
//    H is the frequency response of the five quantised weights; near DC
//    this is close to the weights' sum 3.5;
//  - the in-band SNR (tone bin against all other DFT bins from DC to f_B)
//    must rise by at least 1 dB with each doubling of OSR, and by 10 dB
//    from OSR 32 to 1024;
//  - the mechanisms of the design each occur: both modulator output
//    values, the LFSR wrapping back to its seed after 2^k clocks, and the
//    filter output reaching its two ends 0 and M.
module tb_sdm_sc_top;

  localparam int    M_BITS = 15;
  localparam int    C_BITS = 16;
  localparam int    K_BITS = 15;
  localparam int    TAPS   = 5;
  localparam int    N      = 1 << K_BITS;
  localparam real   AMP    = 0.99;
  localparam real   PI     = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [M_BITS-1:0] u;
  logic        [K_BITS-1:0] w_coef [TAPS];
  logic                     v;
  logic        [2:0]        z;
  logic signed [C_BITS-1:0] y;
  logic        [K_BITS-1:0] r_word;

  int checks = 0;
  int failures = 0;

  sdm_sc_top dut (
    .clk(clk), .rst_n(rst_n), .u(u), .w_coef(w_coef),
    .v(v), .z(z), .y(y), .r_word(r_word)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- independent model of the whole datapath ----
  longint       ym;          // modulator register
  logic [14:0]  rm;          // LFSR word
  logic         hist [TAPS]; // hist[i] = V_{n-i}

  function automatic logic [14:0] lfsr_next(logic [14:0] r);
    logic fb = r[14] ^ r[13];          // x^15 + x^14 + 1
    if (r[13:0] == 14'd0) fb = ~fb;    // all-zero word spliced in
    return {r[13:0], fb};
  endfunction

  function automatic int model_z();
    int cnt = 0;
    logic [14:0] rr = rm;
    for (int i = 0; i < TAPS; i++) begin
      cnt += int'((rr < w_coef[i]) == hist[i]);
      rr = {rr[0], rr[14:1]};
    end
    return cnt;
  endfunction

  // ---- mechanism counters ----
  int n_v1 = 0, n_v0 = 0, n_wrap = 0, n_z0 = 0, n_zmax = 0;

  real wts [TAPS];
  int  zs [N];       // bipolar output samples of the current run
  real snr_db [6];
  int  n_run = 0;

  // Power of DFT bin b of zs[], by the Goertzel recurrence.
  function automatic real bin_power(int b);
    real c = 2.0 * $cos(2.0 * PI * real'(b) / real'(N));
    real s0, s1 = 0.0, s2 = 0.0;
    for (int n = 0; n < N; n++) begin
      s0 = real'(zs[n]) + c * s1 - s2;
      s2 = s1;
      s1 = s0;
    end
    return s1 * s1 + s2 * s2 - c * s1 * s2;
  endfunction

  task automatic run_osr(int osr);
    real re = 0.0, im = 0.0, amp, hre = 0.0, him = 0.0, hmag, expected, w;
    w = 2.0 * PI / real'(2 * osr);
    // reset
    rst_n = 1'b0;
    u = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ym = 0;
    rm = 15'd1;
    foreach (hist[i]) hist[i] = 1'b0;
    for (int n = 0; n < N; n++) begin
      automatic int zb;
      // outputs of the current state
      hist[0] = (ym >= 0);
      checks++;
      if (v != hist[0] || longint'(y) != ym || r_word != rm || int'(z) != model_z()) begin
        failures++;
        if (failures < 10)
          $display("FAIL osr=%0d n=%0d v=%0b/%0b y=%0d/%0d r=%h/%h z=%0d/%0d", osr, n,
                   v, hist[0], y, ym, r_word, rm, z, model_z());
      end
      if (v) n_v1++; else n_v0++;
      if (z == 3'd0) n_z0++;
      if (z == 3'(TAPS)) n_zmax++;
      // bipolar output sample into the single-bin DFT
      zb = 2 * int'(z) - TAPS;
      zs[n] = zb;
      re += real'(zb) * $cos(w * real'(n));
      im -= real'(zb) * $sin(w * real'(n));
      // next input sample
      u = M_BITS'($rtoi($floor(AMP * 16384.0 * $sin(w * real'(n)) + 0.5)));
      @(posedge clk);
      // model update
      begin
        automatic longint fb = hist[0] ? 16384 : -16384;
        ym = ym + longint'(u) - fb;
      end
      rm = lfsr_next(rm);
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      @(negedge clk);
    end
    checks++;
    if (r_word == 15'd1) begin
      n_wrap++;
    end else begin
      failures++;
      $display("FAIL LFSR not back at seed after N clocks");
    end
    // expected amplitude: A * |sum_i w_i e^{-j w i}|
    for (int i = 0; i < TAPS; i++) begin
      hre += wts[i] * $cos(w * real'(i));
      him -= wts[i] * $sin(w * real'(i));
    end
    hmag = $sqrt(hre * hre + him * him);
    expected = AMP * hmag;
    amp = 2.0 * $sqrt(re * re + im * im) / real'(N);
    // In-band SNR: the signal band 0 .. f_B holds bins 0 .. N / (2 * OSR),
    // the tone sits in the top one. Noise is every other in-band bin.
    begin
      automatic int    fb_bin = N / (2 * osr);
      automatic real   psig = bin_power(fb_bin);
      automatic real   pnoise = 0.0;
      for (int b = 0; b < fb_bin; b++) pnoise += bin_power(b);
      snr_db[n_run] = 10.0 * $log10(psig / pnoise);
    end
    $display("OSR %4d: output amplitude at f_B %f, expected %f, in-band SNR %f dB",
             osr, amp, expected, snr_db[n_run]);
    n_run++;
    checks++;
    if (amp < expected - 0.1 || amp > expected + 0.1) begin
      failures++;
      $display("FAIL OSR %0d amplitude %f not within 0.1 of %f", osr, amp, expected);
    end
  endtask

  initial begin
    // bipolar weights coded as round((w + 1) * 2^14)
    w_coef[0] = 15'd27853;   // 0.7
    w_coef[1] = 15'd26214;   // 0.6
    w_coef[2] = 15'd31130;   // 0.9
    w_coef[3] = 15'd26214;   // 0.6
    w_coef[4] = 15'd27853;   // 0.7
    for (int i = 0; i < TAPS; i++) wts[i] = 2.0 * real'(w_coef[i]) / 32768.0 - 1.0;
    u = '0;
    run_osr(32);
    run_osr(64);
    run_osr(128);
    run_osr(256);
    run_osr(512);
    run_osr(1024);
    // Oversampling must pay off: each doubling of OSR raises the in-band SNR.
    for (int i = 1; i < 6; i++) begin
      checks++;
      if (snr_db[i] < snr_db[i-1] + 1.0) begin
        failures++;
        $display("FAIL in-band SNR did not rise from run %0d to run %0d", i - 1, i);
      end
    end
    checks++;
    if (snr_db[5] < snr_db[0] + 10.0) begin
      failures++;
      $display("FAIL in-band SNR gain from OSR 32 to 1024 below 10 dB");
    end
    $display("mechanisms: v=1 %0d, v=0 %0d, LFSR wraps %0d, z=0 %0d, z=M %0d",
             n_v1, n_v0, n_wrap, n_z0, n_zmax);
    checks++;
    if (n_v1 == 0 || n_v0 == 0 || n_wrap == 0 || n_z0 == 0 || n_zmax == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
