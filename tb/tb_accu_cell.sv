`timescale 1ps/1ps
// tb_accu_cell: random stimulus on one accumulator bit, compared with a
// reference that adds the inputs to the fed-back sum and registers both
// the sum and the carry.
module tb_accu_cell;
  logic clk = 0, rst_n = 0, a = 0, ci = 0, s, co;
  logic ref_s = 0, ref_co = 0;
  int checks = 0, failures = 0;

  accu_cell dut (.clk(clk), .rst_n(rst_n), .a(a), .ci(ci), .s(s), .co(co));

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (s !== 1'b0 || co !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      a  = 1'($urandom);
      ci = 1'($urandom);
      @(posedge clk);
      {ref_co, ref_s} = 2'(int'(a) + int'(ci) + int'(ref_s));
      @(negedge clk);
      checks++;
      if (s !== ref_s || co !== ref_co) begin
        failures++;
        $display("FAIL cycle %0d: s=%0d/%0d co=%0d/%0d", i, s, ref_s, co, ref_co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
