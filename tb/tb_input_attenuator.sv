// Testbench for the input attenuator model: the output must be half the
// input (default gain), and a deliberately mismatched gain must be applied.
//
// The real-valued input is set and the output read after a short delay; the
// model has no clock. The factor of one half is the published value; the
// mismatch case shows the gain parameter works.
module tb_input_attenuator;
  real vin, vout, vout2;
  int checks = 0, failures = 0;

  input_attenuator dut (.vin, .vout);
  input_attenuator #(.GAIN(0.48)) dut2 (.vin, .vout(vout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real vals[6] = '{0.0, 1.0, -1.0, 0.3, -0.77, 0.123};
    foreach (vals[i]) begin
      vin = vals[i];
      #1;
      checks += 2;
      if (vout - vals[i] / 2.0 > 1e-12 || vals[i] / 2.0 - vout > 1e-12) begin
        failures++; $display("vin=%f vout=%f", vin, vout);
      end
      if (vout2 - vals[i] * 0.48 > 1e-12 || vals[i] * 0.48 - vout2 > 1e-12) begin
        failures++; $display("vin=%f vout2=%f", vin, vout2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
