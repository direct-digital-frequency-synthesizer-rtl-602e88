`timescale 1ps/1ps
// tb_output_driver: sine inputs riding on 1.2 V. At 4.545 GHz a 0.4 V
// amplitude must come out at 0.4 V, inverted and without DC; at the 314 MHz
// corner it must be 3 dB down; at 50 MHz strongly attenuated; a 1 V input
// must clip at 0.6 V; bias off must silence the output.
module tb_output_driver;
  localparam real PI = 3.14159265358979323846;
  real vin = 1.2, vout, freq = 4.545e9, amp = 0.4;
  logic bias = 1;
  int checks = 0, failures = 0;

  output_driver dut (.vin(vin), .bias_en(bias), .vout(vout));

  always begin
    #5;
    vin = 1.2 + amp * $sin(2.0 * PI * freq * $realtime * 1.0e-12);
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // amplitude, mean, and correlation with the input's AC part
  task automatic measure(input int window_ps, output real a, output real mean, output real corr);
    real vmax = -10.0, vmin = 10.0, acc = 0.0, c = 0.0;
    int n = 0;
    for (int t = 0; t < window_ps; t += 5) begin
      #5;
      if (vout > vmax) vmax = vout;
      if (vout < vmin) vmin = vout;
      acc += vout; c += vout * (vin - 1.2); n++;
    end
    a = (vmax - vmin) / 2.0; mean = acc / real'(n); corr = c / real'(n);
  endtask

  function automatic bit near(input real x, input real want, input real tol);
    return (x > want - tol) && (x < want + tol);
  endfunction

  initial begin
    real a, mean, corr;
    #20000;
    measure(22000, a, mean, corr);
    $display("4.545 GHz: %0.3f V amplitude, mean %0.4f, corr %0.4f", a, mean, corr);
    checks++; if (!near(a, 0.4, 0.02)) begin failures++; $display("FAIL amplitude"); end
    checks++; if (!near(mean, 0.0, 0.01)) begin failures++; $display("FAIL DC"); end
    checks++; if (corr > -0.05) begin failures++; $display("FAIL not inverting"); end

    freq = 314.0e6;
    #30000;
    measure(32000, a, mean, corr);
    $display("314 MHz: %0.3f V amplitude", a);
    checks++; if (!near(a, 0.4 / $sqrt(2.0), 0.03)) begin failures++; $display("FAIL corner"); end

    freq = 50.0e6;
    #100000;
    measure(100000, a, mean, corr);
    $display("50 MHz: %0.3f V amplitude", a);
    checks++; if (a > 0.4 * 0.2) begin failures++; $display("FAIL low-frequency rejection"); end

    freq = 4.545e9; amp = 1.0;
    #20000;
    measure(22000, a, mean, corr);
    $display("1 V input: %0.3f V amplitude", a);
    checks++; if (!near(a, 0.6, 0.01)) begin failures++; $display("FAIL clipping"); end

    amp = 0.4; bias = 0;
    #1000;
    measure(5000, a, mean, corr);
    checks++; if (a > 0.001) begin failures++; $display("FAIL bias off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
