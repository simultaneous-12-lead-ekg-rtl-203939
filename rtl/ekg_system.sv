// ekg_system: the whole 12-lead EKG, from the electrode wires to the VGA
// port, with the analog front end as behavioural models.  Because of those
// real-valued models it is for simulation, not synthesis; `ekg_top` is the
// synthesizable FPGA part inside it.
//
// Each of the nine signal electrodes (RA, LA, LL, V1..V6, on elec_i) passes
// its own 60 Hz notch filter; the tenth wire (RL) is ground, 0 V.  Two
// analog multiplexers, selected by the backend's mux_sel[3:0] and
// mux_sel[7:4], pick the electrodes on the + and - inputs of the
// instrumentation amplifier.  The amplifier output, amp_o (0..1 V), goes to
// the board's ADC, which sits outside this module: the ADC's start, data and
// valid signals are ports.  The backend polls the leads, filters and stores
// them, and draws the selected leads and the heart rate on the VGA port.
//
// Interface and timing: as ekg_top (65 MHz clock, synchronous active-high
// reset), plus the real-valued electrode inputs in volts and the amplifier
// output.  The parameters are passed to ekg_top.
//
// The chain electrodes - notch filters - two muxes - instrumentation
// amplifier - ADC - backend follows the design description; the models'
// component values are explained in their own files.
module ekg_system
  import ekg_pkg::*;
#(
  parameter int unsigned SWITCH_CYCLES = 85,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned DECIM_LOG2    = 6,
  parameter int unsigned DEPTH         = HIST_DEPTH,
  parameter int unsigned THRESHOLD     = 3072,
  parameter int unsigned LOW_RUN       = 40,
  parameter int unsigned RATE_MULT     = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  real                  elec_i [9],   // RA LA LL V1..V6, volts
  output real                  amp_o,        // to the ADC input, volts
  output logic                 adc_convst_o,
  input  sample_t              adc_data_i,
  input  logic                 adc_valid_i,
  input  logic [NUM_LEADS-1:0] sw_i,
  output logic [7:0]           mux_sel_o,
  output logic [3:0]           vga_r_o,
  output logic [3:0]           vga_g_o,
  output logic [3:0]           vga_b_o,
  output logic                 vga_hs_o,
  output logic                 vga_vs_o,
  output logic [15:0]          rate_o,
  output logic [11:0]          beats_o,
  output logic                 beat_o,
  output logic                 dropped_o
);

  real filt [10];
  real vp, vn;

  for (genvar e = 0; e < 9; e++) begin : g_notch
    notch_filter u_notch (.vin(elec_i[e]), .vout(filt[e]));
  end
  assign filt[9] = 0.0;   // RL, the grounded wire

  analog_mux #(.N(10)) u_mux_p (.vin(filt), .sel(mux_sel_o[3:0]), .vout(vp));
  analog_mux #(.N(10)) u_mux_n (.vin(filt), .sel(mux_sel_o[7:4]), .vout(vn));

  instrumentation_amp u_amp (.vp, .vn, .vout(amp_o));

  ekg_top #(
    .SWITCH_CYCLES(SWITCH_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES),
    .DECIM_LOG2(DECIM_LOG2), .DEPTH(DEPTH), .THRESHOLD(THRESHOLD),
    .LOW_RUN(LOW_RUN), .RATE_MULT(RATE_MULT)
  ) u_backend (
    .clk, .rst, .sw_i, .mux_sel_o, .adc_convst_o, .adc_data_i, .adc_valid_i,
    .vga_r_o, .vga_g_o, .vga_b_o, .vga_hs_o, .vga_vs_o,
    .rate_o, .beats_o, .beat_o, .dropped_o
  );

endmodule
