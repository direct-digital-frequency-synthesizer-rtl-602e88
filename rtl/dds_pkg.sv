`timescale 1ps/1ps
// dds_pkg: constants and types shared by the direct digital synthesizer.
//
// The numbers below are the operating point of the synthesizer: a 16-bit
// phase accumulator clocked at 9.09 GHz (110 ps period), 1.2 V supply, and
// a three-stage stagger-tuned band-pass filter of 400 MHz bandwidth with
// 0.5 dB Chebyshev ripple per filter of the bank. The bank size (four
// filters) and the model time step are choices of this implementation.
package dds_pkg;

  // Digital side
  localparam int unsigned ACC_WIDTH  = 16;     // phase accumulator width N
  localparam int unsigned DEF_NUM_BANDS = 4;     // filters in the bank (own choice)

  // Analog operating point
  localparam real DEF_F_CLK_HZ = 9.09e9;        // reference clock
  localparam real VDD_V      = 1.2;            // supply, square-wave high level
  localparam real FILT_BW_HZ = 400.0e6;        // bandwidth of each filter
  localparam real RIPPLE_DB  = 0.5;            // Chebyshev pass-band ripple
  localparam int unsigned FILT_STAGES = 3;     // stagger-tuned stages per filter
  localparam int unsigned DEF_TSTEP_PS = 5;    // time step of the analog models

  // Band selection carried through the decoder's alignment pipeline
  typedef struct packed {
    logic       valid;   // a filter is selected
    logic [7:0] sel;     // index of the selected filter
  } band_sel_t;

endpackage
