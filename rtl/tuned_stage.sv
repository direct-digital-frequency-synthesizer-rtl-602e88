`timescale 1ps/1ps
// tuned_stage: behavioural model of one tuned cascode amplifier stage.
//
// Behavioural model, not synthesizable. The real stage is a cascode pair
// loaded by a parallel RLC tank; around its resonance it acts as a
// second-order band-pass filter. This model reproduces that transfer
// function with a bilinear-transformed resonator (unity gain at resonance),
// updated every TSTEP_PS picoseconds on real-valued voltages.
//
// Stage STAGE (1..N_STAGES) of an N_STAGES-stage stagger-tuned filter with
// centre F_CENTER_HZ, bandwidth BW_HZ and pass-band ripple RIPPLE_DB is tuned
// to   f_k = f0 - (BW/2) * cos((2k-1)*pi/(2n))
// with Q_k = f_k / (BW * sin((2k-1)*pi/(2n))) / tanh(a),
// where tanh(a) turns the Butterworth poles into Chebyshev poles:
// a = asinh(1/sqrt(10^(r/10)-1)) / n. For the default 4.545 GHz, 400 MHz,
// 0.5 dB, three-stage filter this gives 4.37/4.545/4.72 GHz with Q of about
// 41/21/44, the values of the document's worked example.
//
// bias_en low models the bias voltages set to zero: the stage stops
// amplifying and its output rings down to zero. vin and vout are AC
// voltages; the output changes TSTEP_PS after each update instant.
module tuned_stage #(
  parameter real         F_CENTER_HZ = 4.545e9,
  parameter real         BW_HZ       = 400.0e6,
  parameter real         RIPPLE_DB   = 0.5,
  parameter int unsigned N_STAGES    = 3,
  parameter int unsigned STAGE       = 2,
  parameter int unsigned TSTEP_PS    = 5
) (
  input  real  vin,
  input  logic bias_en,
  output real  vout
);

  localparam real PI = 3.14159265358979323846;

  real f_k, q_k, tanh_a, ang;
  real b0, a1, a2;          // normalised biquad coefficients (b1 = 0, b2 = -b0)
  real x1, x2, y1, y2, x, y;

  initial begin
    ang    = (2.0 * real'(STAGE) - 1.0) * PI / (2.0 * real'(N_STAGES));
    tanh_a = $tanh($asinh(1.0 / $sqrt($pow(10.0, RIPPLE_DB / 10.0) - 1.0)) / real'(N_STAGES));
    f_k    = F_CENTER_HZ - (BW_HZ / 2.0) * $cos(ang);
    q_k    = f_k / (BW_HZ * $sin(ang)) / tanh_a;
    begin : coeffs
      real w0, alpha, a0;
      w0    = 2.0 * PI * f_k * real'(TSTEP_PS) * 1.0e-12;
      alpha = $sin(w0) / (2.0 * q_k);
      a0    = 1.0 + alpha;
      b0    = alpha / a0;
      a1    = -2.0 * $cos(w0) / a0;
      a2    = (1.0 - alpha) / a0;
    end
    x1 = 0.0; x2 = 0.0; y1 = 0.0; y2 = 0.0;
    vout = 0.0;
  end

  always begin
    #(TSTEP_PS);
    x  = bias_en ? vin : 0.0;
    y  = b0 * (x - x2) - a1 * y1 - a2 * y2;
    x2 = x1; x1 = x;
    y2 = y1; y1 = y;
    vout <= y;
  end

endmodule
