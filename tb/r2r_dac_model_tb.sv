// Test of the output D/A model: every code gives (code - 128) * VREF / 256, so
// mid-scale is 0 V and the output is monotonic with one LSB per code.
module r2r_dac_model_tb;
  int checks = 0, failures = 0;
  logic [7:0] code;
  real v_out, expv;

  r2r_dac_model #(.DAC_W(8), .VREF(2.56)) dut (.code, .v_out);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #1;
      expv = (c - 128) * 0.01;
      checks++;
      if (v_out - expv > 1e-9 || expv - v_out > 1e-9) begin
        failures++;
        $display("FAIL code %0d: %f expected %f", c, v_out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
