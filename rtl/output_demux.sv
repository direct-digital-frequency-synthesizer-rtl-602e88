`timescale 1ps/1ps
// output_demux: behavioural model of the analog switch between bank and driver.
//
// Behavioural model, not synthesizable: it switches real-valued voltages.
// The output follows the output of filter band_sel while band_valid is high;
// with no filter selected it rests at the VDD level on which the filter
// outputs sit, so the driver sees no AC signal. The switch is ideal and
// instantaneous. The document names this de-multiplexer without designing
// it; the idle level is this design's choice.
module output_demux
  import dds_pkg::*;
#(
  parameter int unsigned NUM_BANDS = DEF_NUM_BANDS,
  localparam int unsigned SW = (NUM_BANDS > 1) ? $clog2(NUM_BANDS) : 1
) (
  input  real           vin [NUM_BANDS],
  input  logic [SW-1:0] band_sel,
  input  logic          band_valid,
  output real           vout
);

  always_comb begin
    vout = VDD_V;
    for (int b = 0; b < int'(NUM_BANDS); b++)
      if (band_valid && (int'(band_sel) == b)) vout = vin[b];
  end

endmodule
