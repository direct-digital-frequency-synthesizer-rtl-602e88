`timescale 1ps/1ps
// tb_dds_top: end-to-end run of the synthesizer at its default size (16-bit
// accumulator, four filters, 9.09 GHz clock, no parameter overrides).
//
// Every cycle the accumulator output is compared with an integer model
// delayed by the 16-cycle latency. The tuning word then hops through
// 8000h, 4000h, 2000h, 6000h (one word per filter of the bank), C000h
// (beyond Nyquist: bank off) and back to 8000h with the driver off. For each
// in-band word the filter selection must change exactly 16 cycles after the
// word, the output on the load must be a sine of about +/-400 mV with no DC,
// and its frequency, counted from zero crossings, must be M*fclk/2^16.
// Mechanisms counted: pipeline latency measured, band switches (frequency
// hops), bank shut-down for an out-of-range word, driver switched off.
module tb_dds_top;
  localparam int N = 16;
  localparam real FCLK = 9.09e9;
  logic clk = 0, rst_n = 0, driver_en = 1;
  logic [N-1:0] ftw = '0, phase;
  logic [1:0] band_sel;
  logic band_valid;
  real filter_out, dds_out;
  int checks = 0, failures = 0;
  int n_latency = 0, n_hops = 0, n_shutdown = 0, n_driver_off = 0;

  dds_top dut (.clk(clk), .rst_n(rst_n), .ftw(ftw), .driver_en(driver_en),
               .phase(phase), .band_sel(band_sel), .band_valid(band_valid),
               .filter_out(filter_out), .dds_out(dds_out));

  always #55 clk = ~clk;   // 110 ps period

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integer model of the accumulator, checked every cycle
  logic [N-1:0] acc_ref = '0;
  logic [N-1:0] hist [N];
  int phase_checks = 0, phase_fail = 0;
  initial for (int k = 0; k < N; k++) hist[k] = '0;
  always @(posedge clk) begin
    if (rst_n) begin
      acc_ref = acc_ref + ftw;
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = acc_ref;
      #1;
      phase_checks++;
      if (phase !== hist[N-1]) phase_fail++;
    end
  end

  task automatic measure(input int window_ps, output real amp, output real mean, output real freq);
    real vmax = -10.0, vmin = 10.0, acc = 0.0, prev = 0.0;
    int n = 0, crossings = 0;
    for (int t = 0; t < window_ps; t += 5) begin
      #5;
      if (dds_out > vmax) vmax = dds_out;
      if (dds_out < vmin) vmin = dds_out;
      if (prev < 0.0 && dds_out >= 0.0) crossings++;
      prev = dds_out;
      acc += dds_out; n++;
    end
    amp = (vmax - vmin) / 2.0; mean = acc / real'(n);
    freq = real'(crossings) / (real'(window_ps) * 1.0e-12);
  endtask

  // apply a word at a negative edge; return cycles until the selection shows it
  task automatic hop(input logic [N-1:0] m, input int want_band, input bit want_valid);
    int cyc = 0;
    @(negedge clk);
    ftw = m;
    do begin
      @(posedge clk); #2; cyc++;
    end while (!(band_valid == want_valid && (!want_valid || int'(band_sel) == want_band)) && cyc < 100);
    checks++;
    if (cyc != N) begin
      failures++;
      $display("FAIL word %h: selection after %0d cycles, expected %0d", m, cyc, N);
    end else if (want_valid) n_hops++;
    else n_shutdown++;
  endtask

  task automatic check_tone(input logic [N-1:0] m);
    real amp, mean, f, f_want;
    f_want = real'(m) * FCLK / 65536.0;
    #80000;
    measure(44000, amp, mean, f);
    $display("word %h: band %0d, %0.1f mV amplitude, mean %0.1f mV, %0.4f GHz (expected %0.4f)",
             m, band_sel, 1000.0 * amp, 1000.0 * mean, f / 1e9, f_want / 1e9);
    checks++;
    if (amp < 0.3 || amp > 0.5) begin failures++; $display("FAIL amplitude"); end
    checks++;
    if (mean > 0.02 || mean < -0.02) begin failures++; $display("FAIL DC on load"); end
    checks++;
    if (f < 0.97 * f_want || f > 1.03 * f_want) begin failures++; $display("FAIL frequency"); end
  endtask

  initial begin
    real amp, mean, f;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. 8000h from reset: the top phase bit first rises after 16 edges
    ftw = 16'h8000;
    lat = 0;
    while (phase[N-1] !== 1'b1 && lat < 100) begin
      @(posedge clk); #2; lat++;
    end
    checks++;
    if (lat != N) begin failures++; $display("FAIL latency %0d", lat); end
    else n_latency++;
    checks++;
    if (!(band_valid && band_sel == 2'd3)) begin failures++; $display("FAIL band for 8000h"); end
    check_tone(16'h8000);

    // 2. frequency hops across the bank
    hop(16'h4000, 1, 1'b1); check_tone(16'h4000);
    hop(16'h2000, 0, 1'b1); check_tone(16'h2000);
    hop(16'h6000, 2, 1'b1); check_tone(16'h6000);

    // 3. beyond Nyquist: no filter biased, output dies away
    hop(16'hC000, 0, 1'b0);
    #80000;
    measure(20000, amp, mean, f);
    $display("word C000h: %0.2f mV amplitude", 1000.0 * amp);
    checks++;
    if (amp > 0.005) begin failures++; $display("FAIL bank not off"); end

    // 4. back in band with the driver switched off
    hop(16'h8000, 3, 1'b1);
    driver_en = 0;
    #80000;
    measure(20000, amp, mean, f);
    checks++;
    if (amp > 0.001) begin failures++; $display("FAIL driver off"); end
    else n_driver_off++;
    checks++;
    if (filter_out < 0.5) begin failures++; $display("FAIL filter output missing"); end

    // accumulator model comparison
    checks++;
    if (phase_fail != 0 || phase_checks < 1000) begin
      failures++; $display("FAIL phase mismatches %0d of %0d", phase_fail, phase_checks);
    end

    $display("mechanisms: latency=%0d hops=%0d shutdown=%0d driver_off=%0d phase_checks=%0d",
             n_latency, n_hops, n_shutdown, n_driver_off, phase_checks);
    if (n_latency == 0) failures++;
    if (n_hops == 0) failures++;
    if (n_shutdown == 0) failures++;
    if (n_driver_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
