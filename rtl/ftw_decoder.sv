`timescale 1ps/1ps
// ftw_decoder: chooses the filter of the bank for a frequency tuning word.
//
// The bank holds NUM_BANDS filters; filter b is centred on the tuning word
// (b+1) * 2^(N-1) / NUM_BANDS, i.e. on fclk*(b+1)/(2*NUM_BANDS). The decoder
// picks the filter whose centre is nearest to the word (rounding to the
// nearest centre, clamped to the bank) and drives a one-hot enable that
// biases only that filter on. A word of zero or above 2^(N-1) (beyond the
// Nyquist frequency fclk/2) selects no filter, so the whole bank is off.
//
// Timing: the selection is registered and then delayed so that it appears
// LATENCY cycles after the word is applied. With LATENCY = N (the default)
// the filter switches on the same edge on which the phase accumulator output
// starts running at the new frequency. Reset selects no filter.
// The document asks for such a decoder but does not design it; the band plan
// and the timing are this design's own.
module ftw_decoder
  import dds_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int unsigned NUM_BANDS = DEF_NUM_BANDS,
  parameter int unsigned LATENCY   = N,
  localparam int unsigned SW = (NUM_BANDS > 1) ? $clog2(NUM_BANDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         ftw,
  output logic [SW-1:0]        band_sel,
  output logic                 band_valid,
  output logic [NUM_BANDS-1:0] band_en
);

  localparam int unsigned PW = N + 9;                      // product width
  localparam logic [PW-1:0] HALF = PW'(1) << (N - 1);      // Nyquist word

  // nearest centre index: round(ftw * NUM_BANDS / 2^(N-1)), centres are 1..NUM_BANDS
  logic [PW-1:0] prod, idx;
  band_sel_t     dec;

  always_comb begin
    prod = PW'(ftw) * PW'(NUM_BANDS) + (HALF >> 1);
    idx  = prod >> (N - 1);
    dec.valid = (ftw != '0) && (PW'(ftw) <= HALF);
    if (idx == '0)                   dec.sel = 8'd0;
    else if (idx >= PW'(NUM_BANDS))  dec.sel = 8'(NUM_BANDS - 1);
    else                             dec.sel = 8'(idx - 1);
    if (!dec.valid) dec.sel = 8'd0;
  end

  localparam int unsigned D = (LATENCY > 0) ? LATENCY : 1;
  band_sel_t pipe [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= dec;
      for (int i = 1; i < int'(D); i++) pipe[i] <= pipe[i-1];
    end
  end

  band_sel_t cur;
  assign cur        = (LATENCY == 0) ? dec : pipe[D-1];
  assign band_sel   = SW'(cur.sel);
  assign band_valid = cur.valid;

  always_comb begin
    band_en = '0;
    if (cur.valid) band_en[SW'(cur.sel)] = 1'b1;
  end

endmodule
