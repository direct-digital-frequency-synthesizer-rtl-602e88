`timescale 1ps/1ps
// tb_phase_accumulator: checks the bit-pipelined accumulator at 16 bits
// against a plain integer accumulator delayed by the 16-cycle latency, with
// a new random tuning word every cycle; measures the latency for M = 8000h
// (top bit toggles every cycle, fclk/2); and runs an 8-bit instance with
// M = 01h, where bit k must toggle every 2^k cycles.
module tb_phase_accumulator;
  localparam int N  = 16;
  localparam int N8 = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  ftw = '0, phase;
  logic [N8-1:0] ftw8 = '0, phase8, prev8;
  logic msb, msb8;
  logic [N-1:0] hist [N];
  logic [N-1:0] acc_ref;
  int checks = 0, failures = 0;

  phase_accumulator #(.N(N))  dut  (.clk(clk), .rst_n(rst_n), .ftw(ftw),  .phase(phase),  .msb(msb));
  phase_accumulator #(.N(N8)) dut8 (.clk(clk), .rst_n(rst_n), .ftw(ftw8), .phase(phase8), .msb(msb8));

  always #55 clk = ~clk;   // 9.09 GHz

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 0; ftw = '0; ftw8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    int lat;
    // 1. latency: M = 8000h from reset; top bit first rises after edge 16
    do_reset();
    ftw = 16'h8000;
    lat = 0;
    while (msb !== 1'b1 && lat < 100) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != N) begin failures++; $display("FAIL latency %0d, expected %0d", lat, N); end
    else $display("latency %0d cycles", lat);
    // then the top bit toggles every cycle: fclk/2 = 4.545 GHz
    for (int i = 0; i < 40; i++) begin
      logic m0;
      m0 = msb;
      @(posedge clk); #1;
      checks++;
      if (msb === m0) begin failures++; $display("FAIL msb not toggling at %0d", i); end
    end

    // 2. random word every cycle against the integer reference
    do_reset();
    acc_ref = '0;
    for (int i = 0; i < N; i++) hist[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      ftw = (i % 500 < 250) ? N'($urandom) : 16'h4000;
      @(posedge clk);
      acc_ref = acc_ref + ftw;
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = acc_ref;
      #1;
      checks++;
      if (phase !== hist[N-1]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: phase=%h expected %h", i, phase, hist[N-1]);
      end
    end

    // 3. 8-bit accumulator with M = 01h: phase counts up by one per cycle
    do_reset();
    ftw8 = 8'h01;
    repeat (N8 + 1) @(posedge clk);
    #1;
    for (int i = 0; i < 600; i++) begin
      prev8 = phase8;
      @(posedge clk); #1;
      checks++;
      if (phase8 !== prev8 + 8'd1) begin
        failures++;
        $display("FAIL 8-bit: %h after %h", phase8, prev8);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
