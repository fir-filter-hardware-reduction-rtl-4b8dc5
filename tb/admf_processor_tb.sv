// Test of the serial processor on its own. The testbench feeds it a decision
// stream (one bit per tick, taken from c_in on the tick clock), keeps the whole
// decision history, runs the step exponent rule over it from the reset idle
// pattern onwards, and forms dy = sum a_k * Delta_{m-1-k} with
// Delta_j = c_{j-1} * 2^{l_j} exactly, wrapped to the accumulator width. It
// checks every dy_out and dac_code, that tick comes every N clocks and that
// dy_valid follows it by one clock. Two coefficient sets are used: a small
// smoothing set, then large random words that push the sum past 12 bits.
module admf_processor_tb;
  import admf_ref_pkg::*;

  localparam int N = 64, B = 8, AW = 12, LMAX = 3;
  int checks = 0, failures = 0, n_ovf = 0, n_out = 0;

  logic clk = 0, rst_n = 0, c_in = 1;
  logic tick, coef_we = 0, dy_valid;
  logic [5:0] coef_waddr = 0;
  logic signed [B-1:0] coef_wdata = 0;
  logic signed [AW-1:0] dy_out;
  logic [7:0] dac_code;

  admf_processor dut (.clk, .rst_n, .c_in, .tick, .coef_we, .coef_waddr, .coef_wdata,
                      .dy_out, .dy_valid, .dac_code);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a [N];
  int c [$];     // decisions, c[i] = c_{i - N - 2} with the reset history first
  int lv [$];    // exponents aligned with c: lv[i] is l of the step signed by c[i]

  // exact dy for the window ending with decision index e (newest tap)
  function automatic longint expected_dy(int e);
    longint s = 0;
    for (int k = 0; k < N; k++) s += longint'(a[k]) * c[e - k] * (1 << lv[e - k]);
    return s;
  endfunction

  task automatic load_coefs(bit big);
    for (int k = 0; k < N; k++) begin
      if (big) a[k] = $urandom_range(0, 255) - 128;
      else     a[k] = 16 - ((k > 32) ? k - 32 : 32 - k) / 2;
      @(negedge clk);
      coef_we = 1; coef_waddr = 6'(k); coef_wdata = B'(a[k]);
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  function automatic void push_bit(int cb);
    int l;
    l = next_lvl(cb, c[c.size() - 1], lv[lv.size() - 1], LMAX);
    c.push_back(cb);
    lv.push_back(l);
  endfunction

  int last_tick, cyc = 0, skip = 0;
  always @(posedge clk) cyc++;

  initial begin
    int run_bit, e;
    longint ex;
    // reset history: alternating, oldest first, exponent 0; newest stored is c_{-2} = -1
    for (int i = 0; i < N + 1; i++) begin
      c.push_back(((N + 1 - i) % 2 == 0) ? 1 : -1);
      lv.push_back(0);
    end
    load_coefs(0);             // coefficient memory is written during reset
    rst_n = 1;
    last_tick = -1;
    run_bit = 1;
    for (int p = 0; p < 1500; p++) begin
      if (p == 900) begin fork load_coefs(1); join_none skip = 3; end
      // choose the bit the processor will take at the end of this period
      if (p < 900) run_bit = ($urandom_range(0, 9) < 3) ? (1 - run_bit) : run_bit;
      else         run_bit = ((p / 40) % 2 == 0) ? 1 : ($urandom_range(0, 1));
      c_in = 1'(run_bit);
      @(posedge clk iff tick);
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != N) begin failures++; $display("FAIL tick spacing %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      e = c.size() - 1;              // window processed during the period that just ended
      ex = expected_dy(e);
      push_bit((run_bit != 0) ? 1 : -1);
      @(negedge clk);
      checks++;
      if (!dy_valid) begin failures++; $display("FAIL dy_valid missing"); end
      if (skip > 0) begin skip--; continue; end
      n_out++;
      if (ex != wrap(ex, AW)) n_ovf++;
      checks++;
      if (longint'(dy_out) != wrap(ex, AW) ||
          dac_code != {~dy_out[AW-1], dy_out[AW-2:4]}) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d dy %0d exp %0d (exact %0d) dac %h", p, dy_out, wrap(ex, AW), ex, dac_code);
      end
      @(negedge clk);
      checks++;
      if (dy_valid) begin failures++; $display("FAIL dy_valid longer than one clock"); end
    end
    $display("outputs checked %0d, accumulator wrapped %0d", n_out, n_ovf);
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
