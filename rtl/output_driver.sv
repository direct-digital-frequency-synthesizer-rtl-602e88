`timescale 1ps/1ps
// output_driver: behavioural model of the class-A output amplifier.
//
// Behavioural model, not synthesizable. The real circuit is one n-channel
// transistor with a choke inductor, AC-coupled at input and output, driving
// a 50 ohm load from 1.2 V. Modelled here as: a first-order high-pass
// (coupling capacitors, lower -3 dB corner F_LOW_HZ = 314 MHz), an inverting
// gain of GAIN (the output is 180 degrees out of phase with the input), and
// a hard limit at +/- VDD_V/2, the full swing the supply allows. The output
// has no DC component. With bias_en low the amplifier is off and its output
// decays to zero. Updated every TSTEP_PS picoseconds.
// The corner, inversion and supply follow the document; GAIN = 1 (800 mVpp
// in, +/-400 mV out) is read from its overall simulation.
module output_driver #(
  parameter real         GAIN     = 1.0,
  parameter real         F_LOW_HZ = 314.0e6,
  parameter real         VDD_V    = 1.2,
  parameter int unsigned TSTEP_PS = 5
) (
  input  real  vin,
  input  logic bias_en,
  output real  vout
);

  localparam real PI = 3.14159265358979323846;

  real k_hp;          // one-pole high-pass coefficient
  real x_prev, hp, y;

  initial begin
    begin : coeff
      real rc, dt;
      rc   = 1.0 / (2.0 * PI * F_LOW_HZ);
      dt   = real'(TSTEP_PS) * 1.0e-12;
      k_hp = rc / (rc + dt);
    end
    x_prev = VDD_V;
    hp     = 0.0;
    vout   = 0.0;
  end

  always begin
    #(TSTEP_PS);
    hp     = k_hp * (hp + vin - x_prev);
    x_prev = vin;
    y      = bias_en ? -GAIN * hp : 0.0;
    if (y >  VDD_V / 2.0) y =  VDD_V / 2.0;
    if (y < -VDD_V / 2.0) y = -VDD_V / 2.0;
    vout <= y;
  end

endmodule
