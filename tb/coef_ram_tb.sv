// Test of the coefficient memory: fill every word, read every word back in a
// shuffled order, overwrite random words while reading others, and check that a
// word reads the new value from the clock edge that writes it.
module coef_ram_tb;
  localparam int N = 64;
  int checks = 0, failures = 0;

  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic signed [7:0] wdata = 0, rdata;
  logic signed [7:0] model [N];

  coef_ram #(.N(N), .B(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(int a);
    raddr = 6'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d got %0d exp %0d", a, rdata, model[a]);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; waddr = 6'(a); wdata = 8'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < N; i++) check_at((i * 37 + 11) % N);
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 6'($urandom); wdata = 8'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check_at(int'(waddr));
      check_at($urandom_range(0, N - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
