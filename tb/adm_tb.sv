// Test of the modulator's digital loop. The testbench closes the loop itself: it
// plays the analog comparator against a digital input x_n (in minimum steps) and
// runs its own model of the modulator equations next to the DUT, comparing the
// feedback code, the step exponent and the output bit every sample. The input
// mixes a sine, a full-scale square wave (slope overload, largest step, code
// saturation), silence (idle pattern, smallest step) and noise. Ticks come every
// 3 clocks to check that the loop only moves on a tick.
module adm_tb;
  import admf_ref_pkg::*;

  localparam int XW = 8;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_max = 0, n_min = 0, n_sat = 0;

  logic clk = 0, rst_n = 0, tick = 0, comp_in = 0;
  logic c_out;
  logic [1:0] lvl;
  logic signed [XW-1:0] xhat_code;

  adm dut (.clk, .rst_n, .tick, .comp_in, .c_out, .lvl, .xhat_code);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xin(int n);
    if (n < 300)  return $rtoi(50.0 * $sin(2.0 * 3.14159265 * n / 53.0));
    if (n < 600)  return ((n / 60) % 2 != 0) ? 300 : -300;
    if (n < 800)  return 0;
    return $urandom_range(0, 160) - 80;
  endfunction

  initial begin
    int rc1, rc2, rl, rx, l, d, xh, x;
    rc1 = 1; rc2 = -1; rl = 0; rx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      // reference values for sample n
      l  = next_lvl(rc1, rc2, rl, 3);
      d  = rc1 * (1 << l);
      xh = rx + d;
      if (xh > 127) begin xh = 127; n_sat++; end
      if (xh < -128) begin xh = -128; n_sat++; end
      if (l > rl) n_up++;
      if (l < rl) n_down++;
      if (l == rl && l == 3) n_max++;
      if (l == rl && l == 0) n_min++;
      x = xin(n);
      @(negedge clk);
      checks++;
      if (int'(xhat_code) != xh || int'(lvl) != l || (c_out ? 1 : -1) != rc1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d xhat %0d/%0d lvl %0d/%0d c %0d/%0d",
                                    n, xhat_code, xh, lvl, l, c_out, rc1);
      end
      comp_in = (x > xh);
      // two idle clocks: nothing may move
      @(negedge clk);
      checks++;
      if (int'(xhat_code) != xh) begin failures++; $display("FAIL moved without tick n=%0d", n); end
      tick = 1;
      @(negedge clk);
      tick = 0;
      rc2 = rc1; rc1 = comp_in ? 1 : -1; rl = l; rx = xh;
    end
    $display("step up %0d, down %0d, hold at max %0d, hold at min %0d, saturated %0d",
             n_up, n_down, n_max, n_min, n_sat);
    checks++;
    if (n_up == 0 || n_down == 0 || n_max == 0 || n_min == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a loop mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
