// analog_mux: behavioural model of one of the two analog multiplexers that
// pick the electrodes fed to the instrumentation amplifier.  Analog part, for
// simulation only.
//
// `vout` follows the real-valued input selected by the 4-bit `sel`; a select
// beyond the last input gives 0 V.  Switching is ideal: no on-resistance, no
// charge injection and no settling time.  Two of these, one on each
// amplifier input, are driven by mux_sel[3:0] and mux_sel[7:4] of the
// backend.
//
// The two multiplexers and their role follow the design description; the
// ten inputs (nine filtered electrodes and the grounded wire) and the 4-bit
// select are this model's reading of it.
module analog_mux #(
  parameter int N = 10
) (
  input  real        vin [N],
  input  logic [3:0] sel,
  output real        vout
);
  always_comb vout = (int'(sel) < N) ? vin[sel] : 0.0;
endmodule
