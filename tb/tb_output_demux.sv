`timescale 1ps/1ps
// tb_output_demux: distinct voltages on the four inputs; each selection
// must pass its own input, and no selection must give the 1.2 V idle level.
module tb_output_demux;
  localparam int NB = 4;
  real vin [NB];
  real vout;
  logic [1:0] sel = '0;
  logic valid = 0;
  int checks = 0, failures = 0;

  output_demux #(.NUM_BANDS(NB)) dut (.vin(vin), .band_sel(sel), .band_valid(valid), .vout(vout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int b = 0; b < NB; b++) vin[b] = 0.8 + 0.1 * real'(b) + 0.01 * real'(rep);
      for (int s = -1; s < NB; s++) begin
        valid = (s >= 0);
        sel = 2'((s < 0) ? rep : s);
        #10;
        checks++;
        if (vout != ((s < 0) ? 1.2 : vin[s])) begin
          failures++;
          $display("FAIL sel=%0d valid=%0d vout=%f", sel, valid, vout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
