`timescale 1ps/1ps
// tb_stagger_filter: drives the 4.545 GHz three-stage filter with 0/1.2 V
// square waves. In band (4.545 GHz) the output must be a sine on the 1.2 V
// level whose amplitude is the square wave's fundamental (4/pi * 0.6 V)
// times the three stage responses (hand-calculated 4.37/4.545/4.72 GHz,
// Q 41.2/21.4/44.4) times the gain, and must have settled by 45 ns. An
// octave below (2.2725 GHz) it must be attenuated by more than 30 dB. Bias
// off must leave only the DC level.
module tb_stagger_filter;
  localparam real PI = 3.14159265358979323846;
  localparam real GAIN = 6.2;
  logic sq = 0, bias = 1;
  int half_ps = 110;
  real vout;
  int checks = 0, failures = 0;

  stagger_filter dut (.sq_in(sq), .bias_en(bias), .vout(vout));

  always begin
    #(half_ps);
    sq = ~sq;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real stage_h(input real f, input real fk, input real q);
    return 1.0 / $sqrt(1.0 + q * q * (f / fk - fk / f) * (f / fk - fk / f));
  endfunction

  task automatic measure(input int window_ps, output real vmax, output real vmin, output real vmean);
    real acc = 0.0;
    int n = 0;
    vmax = -10.0; vmin = 10.0;
    for (int t = 0; t < window_ps; t += 5) begin
      #5;
      if (vout > vmax) vmax = vout;
      if (vout < vmin) vmin = vout;
      acc += vout; n++;
    end
    vmean = acc / real'(n);
  endtask

  initial begin
    real vmax, vmin, vmean, amp45, amp_in, amp_out, expect_amp, f;
    f = 4.545e9;
    expect_amp = 4.0 / PI * 0.6 * GAIN * stage_h(f, 4.37e9, 41.2) * stage_h(f, 4.545e9, 21.4)
               * stage_h(f, 4.72e9, 44.4);
    #45000;
    measure(2200, vmax, vmin, vmean);
    amp45 = (vmax - vmin) / 2.0;
    #100000;
    measure(4400, vmax, vmin, vmean);
    amp_in = (vmax - vmin) / 2.0;
    $display("in band: %0.1f mVpp (expected %0.1f), mean %0.3f V, at 45 ns %0.1f mVpp",
             2000.0 * amp_in, 2000.0 * expect_amp, vmean, 2000.0 * amp45);
    checks++;
    if (amp_in < 0.9 * expect_amp || amp_in > 1.1 * expect_amp) begin failures++; $display("FAIL in-band amplitude"); end
    checks++;
    if (vmean < 1.18 || vmean > 1.22) begin failures++; $display("FAIL DC level"); end
    checks++;
    if (amp45 < 0.95 * amp_in) begin failures++; $display("FAIL not settled by 45 ns"); end

    // an octave below: 2.2725 GHz
    half_ps = 220;
    #150000;
    measure(8800, vmax, vmin, vmean);
    amp_out = (vmax - vmin) / 2.0;
    $display("2.2725 GHz: %0.2f mVpp, %0.1f dB below in-band", 2000.0 * amp_out,
             20.0 * $log10(amp_in / amp_out));
    checks++;
    if (amp_out * 31.6 > amp_in) begin failures++; $display("FAIL out-of-band attenuation"); end

    // bias off
    half_ps = 110;
    bias = 0;
    #100000;
    measure(4400, vmax, vmin, vmean);
    checks++;
    if (vmax - vmin > 0.002 || vmean < 1.19 || vmean > 1.21) begin failures++; $display("FAIL bias off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
