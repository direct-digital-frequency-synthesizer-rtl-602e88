`timescale 1ps/1ps
// tb_ftw_decoder: feeds tuning words (the four band centres, words between
// them, zero, words above Nyquist and random words) and checks, 16 cycles
// later, the selected band against a floating-point nearest-centre model.
module tb_ftw_decoder;
  localparam int N = 16, NB = 4, LAT = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ftw = '0;
  logic [1:0] band_sel;
  logic band_valid;
  logic [NB-1:0] band_en;
  logic [N-1:0] hist [LAT];
  int checks = 0, failures = 0;

  ftw_decoder #(.N(N), .NUM_BANDS(NB), .LATENCY(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .ftw(ftw),
    .band_sel(band_sel), .band_valid(band_valid), .band_en(band_en));

  always #55 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_band(input logic [N-1:0] m, output logic v, output int b);
    real x;
    v = (m != 0) && (m <= 16'h8000);
    x = real'(m) * real'(NB) / 32768.0;   // position in units of band spacing
    b = int'($floor(x + 0.5)) - 1;
    if (b < 0) b = 0;
    if (b > NB - 1) b = NB - 1;
    if (!v) b = 0;
  endfunction

  logic [N-1:0] words [12] = '{16'h2000, 16'h4000, 16'h6000, 16'h8000, 16'h0000, 16'hC000,
                               16'h3000, 16'h2FFF, 16'h0FFF, 16'h1000, 16'h8001, 16'h7000};

  initial begin
    logic v; int b;
    for (int k = 0; k < LAT; k++) hist[k] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (band_valid !== 1'b0 || band_en !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      ftw = (i < 12 * 20) ? words[i / 20] : N'($urandom);
      @(posedge clk);
      for (int k = LAT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = ftw;
      #1;
      expect_band(hist[LAT-1], v, b);
      checks++;
      if (band_valid !== v || (v && (int'(band_sel) != b)) || band_en !== (v ? NB'(1 << b) : '0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL word %h: valid=%0d sel=%0d en=%b, expected valid=%0d sel=%0d",
                   hist[LAT-1], band_valid, band_sel, band_en, v, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
