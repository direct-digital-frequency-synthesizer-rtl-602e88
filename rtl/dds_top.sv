`timescale 1ps/1ps
// dds_top: direct digital synthesizer without look-up table or DAC.
//
// The tuning word ftw (M) is accumulated every clock in a bit-pipelined
// N-bit phase accumulator, whose top bit is a square wave at
// f = M * fclk / 2^N (4.545 GHz for M = 8000h at 9.09 GHz). Instead of a
// sine look-up table and a DAC, a bank of band-pass filters strips the
// harmonics of that square wave: ftw_decoder picks the filter nearest to f,
// filter_mux feeds the square wave to it and biases only it on, output_demux
// takes its sine output to the class-A output_driver, which drives the load.
//
// Interface: clk is the reference clock (110 ps period in the document),
// rst_n an asynchronous active-low reset, driver_en the driver bias.
// Timing: phase and the filter selection change N cycles (16) after ftw;
// the sine then needs a few tens of nanoseconds to settle. A word of 0 or
// above 2^(N-1) selects no filter, leaving the output quiet.
// The digital part is synthesizable; the filters, the de-multiplexer and
// the driver are behavioural models of analog circuits. The accumulator,
// the filter design and the driver follow the document; the decoder,
// multiplexer and de-multiplexer, which it leaves undesigned, and the
// four-filter band plan are this design's own.
module dds_top
  import dds_pkg::*;
#(
  parameter int unsigned N         = ACC_WIDTH,
  parameter int unsigned NUM_BANDS = DEF_NUM_BANDS,
  parameter real         F_CLK_HZ  = DEF_F_CLK_HZ,
  localparam int unsigned SW = (NUM_BANDS > 1) ? $clog2(NUM_BANDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  ftw,
  input  logic          driver_en,
  output logic [N-1:0]  phase,
  output logic [SW-1:0] band_sel,
  output logic          band_valid,
  output real           filter_out,
  output real           dds_out
);

  logic                 msb;
  logic [NUM_BANDS-1:0] band_en;
  logic [NUM_BANDS-1:0] filt_in;
  real                  filt_v [NUM_BANDS];

  phase_accumulator #(.N(N)) u_acc (
    .clk (clk), .rst_n (rst_n), .ftw (ftw), .phase (phase), .msb (msb)
  );

  ftw_decoder #(.N(N), .NUM_BANDS(NUM_BANDS), .LATENCY(N)) u_dec (
    .clk (clk), .rst_n (rst_n), .ftw (ftw),
    .band_sel (band_sel), .band_valid (band_valid), .band_en (band_en)
  );

  filter_mux #(.NUM_BANDS(NUM_BANDS)) u_mux (
    .sq_in (msb), .band_en (band_en), .sq_out (filt_in)
  );

  filter_bank #(.NUM_BANDS(NUM_BANDS), .F_CLK_HZ(F_CLK_HZ)) u_bank (
    .sq_in (filt_in), .band_en (band_en), .vout (filt_v)
  );

  output_demux #(.NUM_BANDS(NUM_BANDS)) u_demux (
    .vin (filt_v), .band_sel (band_sel), .band_valid (band_valid), .vout (filter_out)
  );

  output_driver u_drv (
    .vin (filter_out), .bias_en (driver_en), .vout (dds_out)
  );

endmodule
