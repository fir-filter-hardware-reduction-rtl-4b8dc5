// Speech-like input through the complete filter: does the FIR filter the
// modulator's noise as it filters the signal?
//
// Speech has most of its energy at low frequencies. The input here is white
// noise through two one-pole low-pass sections (poles at 0.9), so its spectrum
// falls with frequency, scaled to about 15 minimum steps rms (the level an AGC
// would set) and fed as a voltage to admf_system at its default sizes. The filter
// is the same 64-tap, 400 Hz low-pass as in the frequency-response test.
//
// Two signal-to-noise ratios are measured over 6000 samples, each against an
// ideal reference and each at the best alignment (0..4 samples of delay):
//   modulator alone : xhat_n against x_n
//   whole filter    : y_m = sum of dy against the exact FIR of the true input
// The filter passes the in-band part of the modulator error and removes the
// rest, so its output SNR must be better than the modulator's by at least 3 dB.
module admf_voice_tb;
  localparam int N = 64, NS = 6000, SKIP = 400;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 16000.0, FC = 400.0, DELTA0 = 0.02;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, comp;
  logic signed [7:0] xhat_code;
  logic c_out, sample_tick, coef_we = 0, dy_valid;
  logic [1:0] step_lvl;
  logic [5:0] coef_waddr = 0;
  logic signed [7:0] coef_wdata = 0;
  logic signed [11:0] dy_out;
  logic [7:0] dac_code;
  real x_in = 0.0, y_out, xhat_v, v_dac;

  admf_system dut (.clk, .rst_n, .x_in, .y_out, .coef_we, .coef_waddr, .coef_wdata, .comp,
                   .xhat_code, .xhat_v, .c_out, .step_lvl, .sample_tick, .dy_out, .dy_valid,
                   .dac_code, .v_dac);

  always #5 clk = ~clk;

  initial begin
    #2000000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  a [N];
  real xs [NS];     // input, in minimum steps
  real xh [NS];     // modulator reconstruction, in minimum steps
  real ys [NS];     // running sum of dy, valid after the sample's pass

  // SNR in dB of est[n] against ref[n - lag], means removed
  function automatic real snr(real ref_sig [NS], real est [NS], int lag);
    real mr = 0.0, me = 0.0, ps = 0.0, pe = 0.0, d;
    int cnt = 0;
    for (int n = SKIP; n < NS; n++) begin mr += ref_sig[n - lag]; me += est[n]; cnt++; end
    mr /= cnt; me /= cnt;
    for (int n = SKIP; n < NS; n++) begin
      d   = (est[n] - me) - (ref_sig[n - lag] - mr);
      ps += (ref_sig[n - lag] - mr) ** 2;
      pe += d * d;
    end
    return 10.0 * $log10(ps / pe);
  endfunction

  initial begin
    real h [N], hs, s1, s2, rms, best_adm, best_flt, v;
    real yideal [NS];
    longint y;
    int seed;
    // low-pass coefficients: Hamming-windowed sinc, 8-bit words summing to ~256
    hs = 0.0;
    for (int k = 0; k < N; k++) begin
      real t;
      t = k - (N - 1) / 2.0;
      h[k] = 2.0 * FC / FS * ((t == 0.0) ? 1.0 : $sin(2.0 * PI * FC / FS * t) / (2.0 * PI * FC / FS * t));
      h[k] = h[k] * (0.54 - 0.46 * $cos(2.0 * PI * k / (N - 1)));
      hs += h[k];
    end
    for (int k = 0; k < N; k++) a[k] = $rtoi(h[k] * 256.0 / hs + ((h[k] >= 0) ? 0.5 : -0.5));
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = 6'(k); coef_wdata = 8'(a[k]);
    end
    @(negedge clk);
    coef_we = 0;
    // speech-like input: white noise through two one-pole low-passes
    s1 = 0.0; s2 = 0.0; rms = 0.0;
    for (int n = 0; n < NS; n++) begin
      v  = $itor($urandom_range(0, 2000)) / 1000.0 - 1.0;
      s1 = 0.9 * s1 + v;
      s2 = 0.9 * s2 + s1;
      xs[n] = s2;
      rms += s2 * s2;
    end
    rms = $sqrt(rms / NS);
    for (int n = 0; n < NS; n++) xs[n] = xs[n] * 15.0 / rms;
    rst_n = 1;
    y = 0;
    for (int n = 0; n < NS; n++) begin
      x_in = DELTA0 * xs[n];
      @(negedge clk);
      xh[n] = $itor(xhat_code);
      @(posedge clk iff sample_tick);
      @(negedge clk);
      y += longint'(dy_out);
      ys[n] = $itor(y);
    end
    // ideal FIR of the true input, for every alignment tried below
    for (int n = 0; n < NS; n++) begin
      yideal[n] = 0.0;
      for (int k = 0; k < N; k++) if (n - k >= 0) yideal[n] += a[k] * xs[n - k];
    end
    best_adm = -100.0; best_flt = -100.0;
    for (int lag = 0; lag <= 4; lag++) begin
      if (snr(xs, xh, lag) > best_adm) best_adm = snr(xs, xh, lag);
      if (snr(yideal, ys, lag) > best_flt) best_flt = snr(yideal, ys, lag);
    end
    $display("SNR modulator alone %0.1f dB, filter output %0.1f dB", best_adm, best_flt);
    checks++;
    if (best_flt < best_adm + 3.0) begin
      failures++;
      $display("FAIL filter output not cleaner than the modulator");
    end
    checks++;
    if (best_adm < 5.0) begin
      failures++;
      $display("FAIL modulator does not track the input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
