// Test of the RC integrator model at 30 Hz / 16 kHz: its impulse response decays
// by exp(-2 pi 30 / 16000) per sample, a constant input settles to
// input / (1 - a) (the leak), and a sine well above the cutoff comes out with the
// gain of an integrator, 1 / |1 - a e^{-jw}|.
module rc_integrator_model_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  real v_in = 0.0, v_out;
  localparam real PI = 3.14159265358979323846;
  real a, prev, peak, g;

  rc_integrator_model dut (.clk, .v_in, .v_out);

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    #5 clk = 1;
    #5 clk = 0;
  endtask

  function automatic bit close(real x, real y, real tol);
    return (x - y <= tol) && (y - x <= tol);
  endfunction

  initial begin
    a = $exp(-2.0 * PI * 30.0 / 16000.0);
    // impulse
    v_in = 1.0; tick(); v_in = 0.0;
    checks++; if (!close(v_out, 1.0, 1e-9)) begin failures++; $display("FAIL impulse %f", v_out); end
    for (int i = 0; i < 20; i++) begin
      prev = v_out; tick();
      checks++;
      if (!close(v_out, a * prev, 1e-9)) begin failures++; $display("FAIL decay %f %f", v_out, prev); end
    end
    // constant input: settles to 1 / (1 - a)
    v_in = 0.5;
    repeat (20000) tick();
    checks++;
    if (!close(v_out, 0.5 / (1.0 - a), 1e-3)) begin failures++; $display("FAIL dc %f", v_out); end
    // 1 kHz sine: integrator gain
    for (int i = 0; i < 16000; i++) begin
      v_in = $sin(2.0 * PI * 1000.0 * i / 16000.0);
      tick();
    end
    peak = 0.0;
    for (int i = 0; i < 16000; i++) begin
      v_in = $sin(2.0 * PI * 1000.0 * i / 16000.0);
      tick();
      if (v_out > peak)  peak = v_out;
      if (-v_out > peak) peak = -v_out;
    end
    g = 1.0 / $sqrt((1.0 - a * $cos(2.0 * PI / 16.0)) ** 2 + (a * $sin(2.0 * PI / 16.0)) ** 2);
    checks++;
    if (!close(peak, g, 0.05 * g)) begin failures++; $display("FAIL sine peak %f expected %f", peak, g); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
