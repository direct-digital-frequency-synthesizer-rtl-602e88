`timescale 1ps/1ps
// tb_filter_bank: four filters centred on 1.136, 2.273, 3.409 and 4.545 GHz.
// For each band in turn a square wave at that band's centre is applied to
// every input while only that band is biased: the selected output must
// carry about 800 mVpp, the others must stay on their 1.2 V DC level.
module tb_filter_bank;
  localparam int NB = 4;
  logic [NB-1:0] en = '0;
  logic sq = 0;
  real half_ps = 440.0;
  real vout [NB];
  int checks = 0, failures = 0;

  filter_bank #(.NUM_BANDS(NB)) dut (.sq_in({NB{sq}}), .band_en(en), .vout(vout));

  always begin
    #(half_ps);
    sq = ~sq;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vmax [NB], vmin [NB];
    for (int b = 0; b < NB; b++) begin
      // band centre fclk*(b+1)/8 -> half period 4*110/(b+1) ps
      half_ps = 440.0 / real'(b + 1);
      en = NB'(1 << b);
      #150000;
      for (int k = 0; k < NB; k++) begin vmax[k] = -10.0; vmin[k] = 10.0; end
      for (int t = 0; t < 8800; t += 5) begin
        #5;
        for (int k = 0; k < NB; k++) begin
          if (vout[k] > vmax[k]) vmax[k] = vout[k];
          if (vout[k] < vmin[k]) vmin[k] = vout[k];
        end
      end
      for (int k = 0; k < NB; k++) begin
        checks++;
        if (k == b) begin
          $display("band %0d: %0.1f mVpp", b, 1000.0 * (vmax[k] - vmin[k]));
          if (vmax[k] - vmin[k] < 0.6 || vmax[k] - vmin[k] > 1.0) begin
            failures++; $display("FAIL band %0d amplitude", b);
          end
        end else if (vmax[k] - vmin[k] > 0.005 || vmax[k] > 1.21 || vmin[k] < 1.19) begin
          failures++; $display("FAIL band %0d active while band %0d selected", k, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
