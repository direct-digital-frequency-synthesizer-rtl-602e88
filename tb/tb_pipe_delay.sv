`timescale 1ps/1ps
// tb_pipe_delay: random bits through chains of depth 5 and 0; each output is
// compared with the input history.
module tb_pipe_delay;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, d = 0, q5, q0;
  logic hist [D];
  int checks = 0, failures = 0;

  pipe_delay #(.DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q5));
  pipe_delay #(.DEPTH(0)) dut0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q0));

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) hist[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL depth 0"); end
      @(posedge clk);
      for (int k = D - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;
      @(negedge clk);
      checks++;
      if (q5 !== hist[D-1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", i, q5, hist[D-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
