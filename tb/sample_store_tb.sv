// Test of the one-bit sample store: reset pattern, then random bits shifted in
// with random gaps, and after every clock both read taps at a random index and,
// every 16 shifts, at every index, against a testbench copy of the history.
module sample_store_tb;
  localparam int N = 64;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [5:0] raddr = 0;
  logic bit_k, bit_k1;
  bit hist [N];

  sample_store #(.N(N)) dut (.clk, .rst_n, .shift, .din, .raddr, .bit_k, .bit_k1);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(int k);
    raddr = 6'(k);
    #1;
    checks++;
    if (bit_k != hist[k] || bit_k1 != ((k == N - 1) ? 1'b0 : hist[k + 1])) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d got %b%b exp %b%b", k, bit_k, bit_k1,
                                  hist[k], (k == N - 1) ? 1'b0 : hist[k + 1]);
    end
  endtask

  initial begin
    automatic int shifts = 0;
    for (int k = 0; k < N; k++) hist[k] = k[0];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) check_at(k);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din   = 1'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k - 1];
        hist[0] = din;
        shifts++;
      end
      @(negedge clk);
      shift = 0;
      check_at($urandom_range(0, N - 1));
      if (shifts % 16 == 0) for (int k = 0; k < N; k++) check_at(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
