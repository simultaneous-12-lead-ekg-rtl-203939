// notch_filter: behavioural model of the 60 Hz twin-T notch filter placed on
// each electrode wire.  It is an analog RC network, so this model is for
// simulation only and is not synthesizable.
//
// The passive twin-T with arms 2R-2R/C and C-C/R (shunts R and 2C) has the
// notch frequency f_N = 1/(4*pi*R*C) and, unloaded, the transfer function
//     H(s) = (s^2 + w0^2) / (s^2 + 4*w0*s + w0^2),   w0 = 2*pi*f_N,
// which passes DC with unity gain and nulls f_N.  The model evaluates this
// filter with the bilinear transform (pre-warped at f_N) every STEP_NS
// nanoseconds of simulated time, on the real-valued voltage `vin`, and
// holds `vout` between steps.  Its state starts at rest (0 V).
//
// The filter type, its place on every electrode wire and the 60 Hz notch
// follow the design description; the component values are not given there,
// so the model is set by F_NOTCH_HZ directly.  The time step and the ideal,
// unloaded response are this model's choices.
module notch_filter #(
  parameter real F_NOTCH_HZ = 60.0,
  parameter real STEP_NS    = 10000.0
) (
  input  real vin,
  output real vout
);
  localparam real PI = 3.141592653589793;

  real w0, k, b0, b1, b2, a0, a1, a2;
  real x1, x2, y1, y2, y;

  initial begin
    w0 = 2.0 * PI * F_NOTCH_HZ;
    k  = w0 / $tan(w0 * STEP_NS * 1.0e-9 / 2.0);
    b0 = k * k + w0 * w0;
    b1 = 2.0 * (w0 * w0 - k * k);
    b2 = b0;
    a0 = k * k + 4.0 * w0 * k + w0 * w0;
    a1 = b1;
    a2 = k * k - 4.0 * w0 * k + w0 * w0;
    x1 = 0.0; x2 = 0.0; y1 = 0.0; y2 = 0.0;
    vout = 0.0;
    forever begin
      #(STEP_NS * 1ns);
      y  = (b0 * vin + b1 * x1 + b2 * x2 - a1 * y1 - a2 * y2) / a0;
      x2 = x1;
      x1 = vin;
      y2 = y1;
      y1 = y;
      vout = y;
    end
  end
endmodule
