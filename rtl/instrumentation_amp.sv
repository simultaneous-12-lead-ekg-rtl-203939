// instrumentation_amp: behavioural model of the three-op-amp instrumentation
// amplifier between the analog multiplexers and the ADC.  Analog part, for
// simulation only.
//
// Two input buffers with the shared gain resistor give a differential gain
// of 1 + 2*R1/RGAIN; the difference stage gives R3/R2 more, and its
// reference terminal sets the output level at zero input.  So
//     vout = VREF + (1 + 2*R1/RGAIN) * (R3/R2) * (vp - vn),
// clipped to the supply rails VLOW..VHIGH.  The op-amps are ideal: no offset,
// noise or bandwidth limit, and infinite common-mode rejection.
//
// The amplifier structure, with one resistor setting the gain, follows the
// design description.  The resistor values, the reference and the rails are
// not given there.  They are chosen here for a gain of 499, so that the
// millivolt-level heart signal fills the 0..1 V input range of the board's
// ADC around a 0.5 V mid-point.
module instrumentation_amp #(
  parameter real R1    = 24.9e3,
  parameter real RGAIN = 100.0,
  parameter real R2    = 10.0e3,
  parameter real R3    = 10.0e3,
  parameter real VREF  = 0.5,
  parameter real VLOW  = 0.0,
  parameter real VHIGH = 1.0
) (
  input  real vp,
  input  real vn,
  output real vout
);
  localparam real GAIN = (1.0 + 2.0 * R1 / RGAIN) * (R3 / R2);

  real v;
  always_comb begin
    v = VREF + GAIN * (vp - vn);
    vout = (v < VLOW) ? VLOW : (v > VHIGH) ? VHIGH : v;
  end
endmodule
