`timescale 1ps/1ps
// tb_tuned_stage: drives stage 1 of the 4.545 GHz filter (tuned to 4.37 GHz,
// Q = 41.2 by the worked design example) with sine waves and compares the
// measured gain with the resonator response 1/sqrt(1 + Q^2 (f/fk - fk/f)^2)
// evaluated from those hand-calculated values; also checks the bias switch.
module tb_tuned_stage;
  localparam real PI = 3.14159265358979323846;
  localparam real FK = 4.37e9, QK = 41.2;   // stage 1 of the example design
  real vin = 0.0, vout, freq = 4.37e9;
  logic bias = 1;
  int checks = 0, failures = 0;

  tuned_stage #(.F_CENTER_HZ(4.545e9), .BW_HZ(400.0e6), .RIPPLE_DB(0.5),
                .N_STAGES(3), .STAGE(1), .TSTEP_PS(5)) dut (
    .vin(vin), .bias_en(bias), .vout(vout));

  always begin
    #5;
    vin = 0.5 * $sin(2.0 * PI * freq * $realtime * 1.0e-12);
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peak |vout| over a window
  task automatic measure(input int window_ps, output real pk);
    pk = 0.0;
    for (int t = 0; t < window_ps; t += 5) begin
      #5;
      if (vout > pk) pk = vout;
      if (-vout > pk) pk = -vout;
    end
  endtask

  initial begin
    real pk, expect_gain, f;
    real fs [4] = '{4.37e9, 4.545e9, 4.30e9, 2.2725e9};
    for (int i = 0; i < 4; i++) begin
      f = fs[i];
      freq = f;
      #60000;                       // settle: time constant Q/(pi f) ~ 3 ns
      measure(5000, pk);
      expect_gain = 1.0 / $sqrt(1.0 + QK * QK * (f / FK - FK / f) * (f / FK - FK / f));
      checks++;
      $display("f=%0.4f GHz gain=%0.4f expected %0.4f", f / 1e9, pk / 0.5, expect_gain);
      if ((pk / 0.5 - expect_gain) > 0.05 * expect_gain + 0.002 || (expect_gain - pk / 0.5) > 0.05 * expect_gain + 0.002) begin
        failures++;
        $display("FAIL gain at %0.4f GHz", f / 1e9);
      end
    end
    // bias off: the stage stops passing signal
    freq = 4.37e9;
    bias = 0;
    #40000;
    measure(5000, pk);
    checks++;
    if (pk > 0.005) begin failures++; $display("FAIL bias off, peak %f", pk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
