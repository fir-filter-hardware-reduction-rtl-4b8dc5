// Exhaustive test of the step size logic: every pair of decisions and every
// previous exponent, for the default four step sizes and for a larger range,
// against the exponent rule written out case by case.
module step_size_logic_tb;
  import admf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic       c1, c2;
  logic [1:0] lp, ln;
  logic [2:0] lp5, ln5;

  step_size_logic                dut  (.c1(c1), .c2(c2), .lvl_prev(lp),  .lvl_next(ln));
  step_size_logic #(.LMAX(5))    dut5 (.c1(c1), .c2(c2), .lvl_prev(lp5), .lvl_next(ln5));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        for (int l = 0; l < 6; l++) begin
          int exp3, exp5;
          c1 = a[0]; c2 = b[0];
          lp = 2'(l); lp5 = 3'(l);
          #1;
          exp5 = next_lvl((a != 0) ? 1 : -1, (b != 0) ? 1 : -1, l, 5);
          checks++;
          if (int'(ln5) != exp5) begin
            failures++;
            $display("FAIL LMAX=5 c1=%0d c2=%0d l=%0d got %0d exp %0d", a, b, l, ln5, exp5);
          end
          if (l < 4) begin
            exp3 = next_lvl((a != 0) ? 1 : -1, (b != 0) ? 1 : -1, l, 3);
            checks++;
            if (int'(ln) != exp3) begin
              failures++;
              $display("FAIL LMAX=3 c1=%0d c2=%0d l=%0d got %0d exp %0d", a, b, l, ln, exp3);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
