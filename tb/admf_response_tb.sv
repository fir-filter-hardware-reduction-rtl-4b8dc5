// Frequency response of the complete filter chain, the measurement the filter is
// characterized by: a 64-tap low-pass FIR, a sine input of 1 V peak equal to 50
// minimum steps, 16 kHz sampling (64 processor clocks per sample).
//
// Chain (admf_system at its default sizes): sine -> analog front-end model
// (comparator against the feedback D/A) -> digital core -> 8-bit output D/A model
// -> RC lossy integrator model (30 Hz). The coefficients are a Hamming-windowed sinc with a
// 400 Hz cutoff, scaled so that they sum to about 256 and rounded to 8 bits; this
// is a stand-in for the prototype's own (unpublished) low-pass coefficients.
//
// For each test frequency the testbench lets the chain settle, then measures the
// amplitude at the test frequency over whole periods by correlation, both on the
// digital output y (the running sum of dy_out) and on the integrator's output
// voltage, and compares them with the theory:
//   digital: 50 * |A(f)|,  A(f) = sum a_k e^{-j w k}
//   analog : the same, times the D/A scale (VREF / 2^8 per 16 units of dy) and the
//            lossy-integrator correction |(1 - e^{-jw}) / (1 - a e^{-jw})|.
// Pass band frequencies must lie within 1.5 dB of theory; stop band frequencies
// must be at least 15 dB below the pass band, where the modulator's noise sets a
// floor instead of the theoretical attenuation.
module admf_response_tb;
  localparam int N = 64;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 16000.0, FC = 400.0, VREF = 1.0, DELTA0 = 0.02;
  localparam int NF = 7;
  localparam real FREQ [NF] = '{100.0, 200.0, 250.0, 400.0, 1000.0, 2000.0, 4000.0};
  localparam bit  PASS [NF] = '{1, 1, 1, 0, 0, 0, 0};
  localparam bit  STOP [NF] = '{0, 0, 0, 0, 1, 1, 1};

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, comp_in;
  logic signed [7:0] xhat_code;
  logic c_out, sample_tick, coef_we = 0, dy_valid;
  logic [1:0] step_lvl;
  logic [5:0] coef_waddr = 0;
  logic signed [7:0] coef_wdata = 0;
  logic signed [11:0] dy_out;
  logic [7:0] dac_code;
  real x_in = 0.0, xhat_v, v_dac, v_int;

  admf_system #(.DELTA0(DELTA0), .VREF(VREF), .FS_HZ(FS)) dut (
    .clk, .rst_n, .x_in, .y_out(v_int), .coef_we, .coef_waddr, .coef_wdata, .comp(comp_in),
    .xhat_code, .xhat_v, .c_out, .step_lvl, .sample_tick, .dy_out, .dy_valid, .dac_code, .v_dac);

  always #5 clk = ~clk;

  initial begin
    #2000000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a [N];

  function automatic real mag_fir(real f);
    real re = 0.0, im = 0.0, w;
    w = 2.0 * PI * f / FS;
    for (int k = 0; k < N; k++) begin
      re += a[k] * $cos(w * k);
      im -= a[k] * $sin(w * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real db(real v);
    return 20.0 * $log10(v);
  endfunction

  initial begin
    real h [N], hs, w, alpha, yv, sum_s, sum_c, an_s, an_c, t_dig, m_dig, m_an, t_an;
    real pass_ref, corr;
    longint y;
    int nper, m, nset, asum;
    // Hamming-windowed sinc, 8-bit words summing to about 256
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
    rst_n = 1;
    alpha = $exp(-2.0 * PI * 30.0 / FS);
    y = 0;
    pass_ref = 0.0;
    m = 0;
    asum = 0;
    for (int k = 0; k < N; k++) asum += a[k];
    $display("coefficient sum %0d; gains below are relative to it (0 dB = unity DC gain)", asum);
    $display("  f (Hz)   theory (dB)   y (dB)   analog out (dBV)   analog theory (dBV)");
    for (int fi = 0; fi < NF; fi++) begin
      nper = $rtoi(FS / FREQ[fi]);
      nset = 800;
      sum_s = 0.0; sum_c = 0.0; an_s = 0.0; an_c = 0.0;
      for (int i = 0; i < nset + 16 * nper; i++) begin
        x_in = 1.0 * $sin(2.0 * PI * FREQ[fi] * m / FS);
        m++;
        @(posedge clk iff sample_tick);
        @(negedge clk);
        y += longint'(dy_out);
        if (i >= nset) begin
          w = 2.0 * PI * FREQ[fi] * (i - nset) / FS;
          sum_s += $itor(y) * $sin(w);  sum_c += $itor(y) * $cos(w);
          an_s  += v_int * $sin(w);     an_c  += v_int * $cos(w);
        end
      end
      m_dig = 2.0 * $sqrt(sum_s * sum_s + sum_c * sum_c) / (16 * nper);
      m_an  = 2.0 * $sqrt(an_s * an_s + an_c * an_c) / (16 * nper);
      t_dig = 50.0 * mag_fir(FREQ[fi]);
      w = 2.0 * PI * FREQ[fi] / FS;
      corr = $sqrt((2.0 - 2.0 * $cos(w)) / (1.0 - 2.0 * alpha * $cos(w) + alpha * alpha));
      t_an = t_dig / 16.0 * VREF / 256.0 * corr;
      $display("  %6.0f   %8.2f   %8.2f   %8.2f   %8.2f", FREQ[fi], db(t_dig / 50.0 / asum),
               db(m_dig / 50.0 / asum), db(m_an), db(t_an));
      if (fi == 0) pass_ref = m_dig;
      if (PASS[fi]) begin
        checks += 2;
        if (db(m_dig) - db(t_dig) > 1.5 || db(t_dig) - db(m_dig) > 1.5) begin
          failures++; $display("FAIL %0.0f Hz: y off theory", FREQ[fi]);
        end
        if (db(m_an) - db(t_an) > 1.5 || db(t_an) - db(m_an) > 1.5) begin
          failures++; $display("FAIL %0.0f Hz: analog output off theory", FREQ[fi]);
        end
      end
      if (STOP[fi]) begin
        checks++;
        if (db(pass_ref) - db(m_dig) < 15.0) begin
          failures++; $display("FAIL %0.0f Hz: stop band only %0.1f dB down", FREQ[fi], db(pass_ref) - db(m_dig));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
