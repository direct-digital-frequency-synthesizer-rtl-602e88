`timescale 1ps/1ps
// filter_bank: behavioural model of the bank of stagger-tuned filters.
//
// Behavioural model, not synthesizable. NUM_BANDS copies of stagger_filter,
// filter b centred on F_CLK_HZ*(b+1)/(2*NUM_BANDS): with four filters and a
// 9.09 GHz clock the centres are 1.136, 2.273, 3.409 and 4.545 GHz, each
// 400 MHz wide. Each filter has its own square-wave input (from filter_mux)
// and its own bias enable (from ftw_decoder); a filter whose bias is off
// gives its DC level only. Building the bank from copies of one filter design
// tuned to different bands follows the document; the band plan is this
// design's own.
module filter_bank
  import dds_pkg::*;
#(
  parameter int unsigned NUM_BANDS = DEF_NUM_BANDS,
  parameter real         F_CLK_HZ  = DEF_F_CLK_HZ,
  parameter real         GAIN      = 6.2,
  parameter int unsigned TSTEP_PS  = DEF_TSTEP_PS
) (
  input  logic [NUM_BANDS-1:0] sq_in,
  input  logic [NUM_BANDS-1:0] band_en,
  output real                  vout [NUM_BANDS]
);

  for (genvar b = 0; b < int'(NUM_BANDS); b++) begin : g_band
    stagger_filter #(
      .F_CENTER_HZ (F_CLK_HZ * real'(b + 1) / (2.0 * real'(NUM_BANDS))),
      .BW_HZ       (FILT_BW_HZ),
      .RIPPLE_DB   (RIPPLE_DB),
      .N_STAGES    (FILT_STAGES),
      .GAIN        (GAIN),
      .VDD_V       (VDD_V),
      .TSTEP_PS    (TSTEP_PS)
    ) u_filter (
      .sq_in   (sq_in[b]),
      .bias_en (band_en[b]),
      .vout    (vout[b])
    );
  end

endmodule
