`timescale 1ps/1ps
// tb_filter_mux: every one-hot (and the all-off) enable with both levels of
// the square wave; only the selected filter input may follow it.
module tb_filter_mux;
  localparam int NB = 4;
  logic sq = 0;
  logic [NB-1:0] en = '0, out;
  int checks = 0, failures = 0;

  filter_mux #(.NUM_BANDS(NB)) dut (.sq_in(sq), .band_en(en), .sq_out(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sel = -1; sel < NB; sel++) begin
      for (int lvl = 0; lvl < 2; lvl++) begin
        en = (sel < 0) ? '0 : NB'(1 << sel);
        sq = 1'(lvl);
        #10;
        for (int b = 0; b < NB; b++) begin
          checks++;
          if (out[b] !== ((b == sel) ? sq : 1'b0)) begin
            failures++;
            $display("FAIL sel=%0d sq=%0d out=%b", sel, sq, out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
