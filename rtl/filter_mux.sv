`timescale 1ps/1ps
// filter_mux: routes the phase accumulator's square wave to one filter.
//
// The accumulator's top bit is passed to the input of the filter whose
// enable is set; every other filter input is held low, so an unselected
// filter sees no signal. band_en is the one-hot enable from ftw_decoder.
// Purely combinational. The document names this multiplexer without
// designing it; gating each filter input with its enable is this design's
// choice.
module filter_mux #(
  parameter int unsigned NUM_BANDS = 4
) (
  input  logic                 sq_in,
  input  logic [NUM_BANDS-1:0] band_en,
  output logic [NUM_BANDS-1:0] sq_out
);

  always_comb begin
    for (int b = 0; b < int'(NUM_BANDS); b++) sq_out[b] = band_en[b] & sq_in;
  end

  // the enables come from a one-hot decoder
  always_comb assert ($onehot0(band_en)) else $error("filter_mux: band_en not one-hot");

endmodule
