// End-to-end test of the complete filter (analog models around the digital core)
// at its default sizes: 64 taps, 8-bit coefficients, 12-bit accumulator, four
// step sizes, one sample every 64 clocks.
//
// The testbench drives the analog input x(t) with x_n minimum steps (times 20 mV,
// offset by half a step so that no comparison is a tie) and runs its own model of
// the modulator next to the design: every sample it checks the comparator
// decision, the feedback code and voltage, the step exponent and the output bit.
// From the model's step history it forms the exact FIR difference
// dy = sum a_k * Delta_{m-1-k}, wraps it to 12 bits and checks dy_out, the D/A code
// and the D/A voltage, the sample period and the output strobe. It also sums dy
// into y and checks that y follows sum a_k * xhat_{m-1-k}, and that the analog
// integrator output follows the sampled RC recursion of the D/A voltage.
//
// The input walks through a sine, a full-scale square wave, silence and noise,
// and the coefficients are reprogrammed half way from a small low-pass set to
// large random words. Each mechanism is counted and must occur: step exponent up,
// down, held at the largest and at the smallest step, feedback code saturation,
// accumulator wrap-around and coefficient reprogramming.
module admf_system_tb;
  import admf_ref_pkg::*;

  localparam int N = 64, AW = 12, LMAX = 3, NSAMP = 2400;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_max = 0, n_min = 0, n_sat = 0, n_ovf = 0, n_reprog = 0;

  logic clk = 0, rst_n = 0, comp;
  real x_in = 0.0, y_out, xhat_v, v_dac;
  logic signed [7:0] xhat_code;
  logic c_out, sample_tick, coef_we = 0, dy_valid;
  logic [1:0] step_lvl;
  logic [5:0] coef_waddr = 0;
  logic signed [7:0] coef_wdata = 0;
  logic signed [AW-1:0] dy_out;
  logic [7:0] dac_code;

  admf_system dut (.clk, .rst_n, .x_in, .y_out, .coef_we, .coef_waddr, .coef_wdata, .comp,
                  .xhat_code, .xhat_v, .c_out, .step_lvl, .sample_tick, .dy_out, .dy_valid,
                  .dac_code, .v_dac);

  function automatic bit close(real p, real q);
    return (p - q < 1e-9) && (q - p < 1e-9);
  endfunction

  // integrator model check: y_out must follow y <= a*y + v_dac at each dy_valid
  real yr = 0.0, ra, vexp;
  bit  vok;
  int n_integ = 0;
  initial ra = $exp(-2.0 * 3.14159265358979323846 * 30.0 / 16000.0);
  always @(posedge dy_valid) begin
    yr = ra * yr + v_dac;
    #1;
    checks++;
    n_integ++;
    if (!close(y_out, yr)) begin
      failures++;
      if (failures < 10) $display("FAIL integrator %f expected %f", y_out, yr);
    end
  end

  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a [N];
  int dl [$];   // step history Delta_j, reset idle history first
  int xh [$];   // xhat history, aligned with dl

  function automatic int xin(int n);
    if (n < 600)  return $rtoi(50.0 * $sin(2.0 * 3.14159265 * n / 53.0));
    if (n < 900)  return ((n / 60) % 2 != 0) ? 300 : -300;
    if (n < 1100) return 0;
    if (n < 1500) return $urandom_range(0, 120) - 60;
    return ((n / 48) % 2 != 0) ? 140 : -140;
  endfunction

  // coefficients are written one per clock while the filter runs; the outputs
  // computed while the set changes are not checked
  task automatic load_coefs(bit big);
    for (int k = 0; k < N; k++) begin
      if (big) a[k] = $urandom_range(0, 255) - 128;
      else     a[k] = 16 - ((k > 32) ? k - 32 : 32 - k) / 2;
      @(negedge clk);
      coef_we = 1; coef_waddr = 6'(k); coef_wdata = 8'(a[k]);
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int rc1, rc2, rl, rx, l, d, x, e, last_tick, skip, xv;
    longint ex, y, y0, yref, yref0;
    // idle history before reset: steps +1/-1 alternating, Delta_0 = +1
    for (int j = -N - 1; j < 0; j++) begin
      dl.push_back((j % 2 == 0) ? 1 : -1);
      xh.push_back(0);
    end
    rc1 = 1; rc2 = -1; rl = 0; rx = 0;
    load_coefs(0);
    n_reprog++;
    rst_n = 1;
    last_tick = -1; skip = 0; y = 0; y0 = 0; yref0 = 0;
    for (int n = 0; n < NSAMP; n++) begin
      // model of sample n
      l = next_lvl(rc1, rc2, rl, LMAX);
      d = rc1 * (1 << l);
      if (l > rl) n_up++;
      if (l < rl) n_down++;
      if (l == rl && l == LMAX) n_max++;
      if (l == rl && l == 0) n_min++;
      x = rx + d;
      if (x > 127)  begin x = 127;  n_sat++; end
      if (x < -128) begin x = -128; n_sat++; end
      dl.push_back(d);
      xh.push_back(x);
      @(negedge clk);
      checks++;
      if (int'(xhat_code) != x || int'(step_lvl) != l || (c_out ? 1 : -1) != rc1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d xhat %0d/%0d lvl %0d/%0d", n, xhat_code, x, step_lvl, l);
      end
      xv = xin(n);
      x_in = 0.02 * (xv - 0.5);
      #1;
      checks++;
      if (comp != (xv > x) || !close(xhat_v, 0.02 * x)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d comparator %b feedback %f", n, comp, xhat_v);
      end
      if (n == 1500) begin
        fork load_coefs(1); join_none
        n_reprog++;
        skip = 3;
      end
      @(posedge clk iff sample_tick);
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != N) begin failures++; $display("FAIL sample period %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      // the processor has just finished the window whose newest step is Delta_{n-1}
      e = dl.size() - 2;
      ex = 0;
      for (int k = 0; k < N; k++) ex += longint'(a[k]) * dl[e - k];
      rc2 = rc1; rc1 = (xv > x) ? 1 : -1; rl = l; rx = x;
      @(negedge clk);
      checks++;
      if (!dy_valid) begin failures++; $display("FAIL no dy_valid after tick"); end
      if (skip > 0) begin skip--; continue; end
      if (ex != wrap(ex, AW)) n_ovf++;
      vexp = ($itor(dac_code) - 128.0) / 256.0;
      vok  = close(v_dac, vexp);
      checks++;
      if (longint'(dy_out) != wrap(ex, AW) || dac_code != {~dy_out[AW-1], dy_out[AW-2:4]} || !vok) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dy %0d exp %0d", n, dy_out, wrap(ex, AW));
      end
      // running output: y follows the FIR of xhat once the window holds no reset
      // history, as long as xhat has not saturated
      if (n >= N + 2 && n < 600) begin
        y += longint'(dy_out);
        yref = 0;
        for (int k = 0; k < N; k++) yref += longint'(a[k]) * xh[e - k];
        if (n == N + 2) begin y0 = y; yref0 = yref; end
        checks++;
        if (y - y0 != yref - yref0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d y %0d yref %0d", n, y - y0, yref - yref0);
        end
      end
    end
    $display("steps up %0d down %0d held-max %0d held-min %0d xhat-sat %0d acc-wrap %0d reprogram %0d",
             n_up, n_down, n_max, n_min, n_sat, n_ovf, n_reprog);
    $display("integrator updates %0d", n_integ);
    checks++;
    if (n_integ < NSAMP - 2 || n_up == 0 || n_down == 0 || n_max == 0 || n_min == 0 || n_sat == 0 || n_ovf == 0 || n_reprog < 2) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
