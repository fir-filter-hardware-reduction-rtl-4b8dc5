// Test of the modulator's analog front-end model: the feedback voltage is the
// code times the minimum step, and the decision is +1 exactly when the input is
// above it, over a sweep of codes and inputs just above and below.
module adm_analog_model_tb;
  int checks = 0, failures = 0;
  real x_in, xhat_v;
  logic signed [7:0] xhat_code;
  logic comp_out;

  adm_analog_model #(.DELTA0(0.02)) dut (.x_in, .xhat_code, .comp_out, .xhat_v);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = -128; c < 128; c += 3) begin
      xhat_code = 8'(c);
      for (int s = -1; s <= 1; s += 2) begin
        x_in = 0.02 * c + s * 0.003;
        #1;
        checks++;
        if ((xhat_v - 0.02 * c) > 1e-9 || (0.02 * c - xhat_v) > 1e-9 || comp_out != (s > 0)) begin
          failures++;
          $display("FAIL code %0d x %f: v %f comp %b", c, x_in, xhat_v, comp_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
