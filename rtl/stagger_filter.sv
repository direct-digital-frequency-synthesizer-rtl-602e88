`timescale 1ps/1ps
// stagger_filter: behavioural model of the three-stage stagger-tuned filter.
//
// Behavioural model, not synthesizable. It turns the accumulator's square
// wave into a sine by stripping its harmonics. The 0 / VDD square wave is
// converted to a voltage, passed through N_STAGES tuned_stage models tuned
// in a staggered (Chebyshev) pattern around F_CENTER_HZ, scaled by GAIN and
// inverted (the common-source cascode inverts), and put on the VDD level at
// which the tanks sit. With the defaults a square wave at the centre
// frequency gives a sine of roughly 0.8 V peak to peak around 1.2 V, and a
// tone an octave away is attenuated by far more than 30 dB. The response
// settles within a few tens of nanoseconds.
//
// bias_en low switches every stage off. Update period TSTEP_PS.
// Stage tuning follows the document's design procedure; GAIN, the inversion
// and the time-step discretisation are this model's choices.
module stagger_filter #(
  parameter real         F_CENTER_HZ = 4.545e9,
  parameter real         BW_HZ       = 400.0e6,
  parameter real         RIPPLE_DB   = 0.5,
  parameter int unsigned N_STAGES    = 3,
  parameter real         GAIN        = 6.2,
  parameter real         VDD_V       = 1.2,
  parameter int unsigned TSTEP_PS    = 5
) (
  input  logic sq_in,
  input  logic bias_en,
  output real  vout
);

  real v [N_STAGES+1];

  // decoupling capacitor: only the AC part of the square wave matters, and
  // the band-pass stages reject DC themselves
  always_comb v[0] = sq_in ? VDD_V : 0.0;

  for (genvar k = 1; k <= int'(N_STAGES); k++) begin : g_stage
    tuned_stage #(
      .F_CENTER_HZ (F_CENTER_HZ),
      .BW_HZ       (BW_HZ),
      .RIPPLE_DB   (RIPPLE_DB),
      .N_STAGES    (N_STAGES),
      .STAGE       (k),
      .TSTEP_PS    (TSTEP_PS)
    ) u_stage (
      .vin     (v[k-1]),
      .bias_en (bias_en),
      .vout    (v[k])
    );
  end

  always_comb vout = VDD_V - GAIN * v[N_STAGES];

endmodule
