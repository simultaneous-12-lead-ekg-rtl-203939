// ekg_top: digital backend of a 12-lead EKG that shows any set of leads at
// once.
//
// Data path: EKG Main times a switch strobe; on each strobe the recorder
// selects the next virtual lead on the two analog muxes (mux_sel_o), starts
// the ADC and tags its reading with the lead; the lead filter averages 64
// readings of each lead into one stored sample (about 1 kS/s per lead); the
// EKG memory keeps the last 3000 samples (3 s) of each lead.
//
// Display path: the display counts out the XVGA frame; for every pixel the
// split screen logic reads the memory and draws the leads chosen on sw_i,
// one strip each, while the pulse logic counts the V1 beats of the last
// 3 seconds and draws the rate in beats per minute in the top right; EKG
// Main ORs the two pixels for the display.
//
// Interface: one 65 MHz clock and a synchronous active-high reset.  The
// analog front end (electrodes, 60 Hz notch filters, muxes, instrumentation
// amplifier) and the board's ADC sit outside: mux_sel_o[3:0] and [7:4] are
// the + and - mux selects, adc_convst_o starts a conversion, adc_data_i is
// taken when adc_valid_i is high.  rate_o and beats_o are the heart rate and
// the beats counted, beat_o pulses on each beat and dropped_o on each
// abandoned ADC conversion, for status lights.
//
// The block structure and the signals between blocks follow the design's
// block diagram; the parameters are explained in each block.
module ekg_top
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
  input  logic [NUM_LEADS-1:0] sw_i,
  output logic [7:0]           mux_sel_o,
  output logic                 adc_convst_o,
  input  sample_t              adc_data_i,
  input  logic                 adc_valid_i,
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

  logic                 rec_switch;
  mux_sel_t             mux_sel;
  lead_sample_t         raw_sample, filt_sample, value_bus;
  logic [15:0]          rd_addr;
  sample_t              rd_data;
  logic [11:0]          oldest, view_start;
  logic [NUM_LEADS-1:0] select;
  pixel_t               pix_split, pix_pulse, pix_main;
  hcount_t              hcount;
  vcount_t              vcount;
  logic                 frame_start;

  ekg_main #(.SWITCH_CYCLES(SWITCH_CYCLES)) u_main (
    .clk, .rst,
    .sw_i,
    .pix_split_i  (pix_split),
    .pix_pulse_i  (pix_pulse),
    .mem_oldest_i (oldest),
    .frame_start_i(frame_start),
    .select_o     (select),
    .view_start_o (view_start),
    .pixel_o      (pix_main),
    .rec_switch_o (rec_switch)
  );

  recorder #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_recorder (
    .clk, .rst,
    .switch_i    (rec_switch),
    .mux_sel_o   (mux_sel),
    .adc_convst_o,
    .adc_data_i,
    .adc_valid_i,
    .sample_o    (raw_sample),
    .dropped_o
  );
  assign mux_sel_o = mux_sel;

  lead_filter #(.DECIM_LOG2(DECIM_LOG2)) u_filter (
    .clk, .rst,
    .in_i (raw_sample),
    .out_o(filt_sample)
  );

  ekg_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst,
    .wr_i     (filt_sample),
    .rd_addr_i(rd_addr),
    .rd_data_o(rd_data),
    .value_o  (value_bus),
    .oldest_o (oldest)
  );

  split_screen #(.DEPTH(DEPTH)) u_split (
    .clk, .rst,
    .select_i    (select),
    .view_start_i(view_start),
    .hcount_i    (hcount),
    .vcount_i    (vcount),
    .rd_addr_o   (rd_addr),
    .rd_data_i   (rd_data),
    .pixel_o     (pix_split)
  );

  pulse_logic #(
    .DEPTH(DEPTH), .THRESHOLD(THRESHOLD), .LOW_RUN(LOW_RUN),
    .RATE_MULT(RATE_MULT), .PULSE_LEAD(int'(LEAD_V1))
  ) u_pulse (
    .clk, .rst,
    .value_i (value_bus),
    .hcount_i(hcount),
    .vcount_i(vcount),
    .pixel_o (pix_pulse),
    .beat_o,
    .beats_o,
    .rate_o
  );

  display u_display (
    .clk, .rst,
    .pixel_i      (pix_main),
    .hcount_o     (hcount),
    .vcount_o     (vcount),
    .frame_start_o(frame_start),
    .vga_r_o, .vga_g_o, .vga_b_o, .vga_hs_o, .vga_vs_o
  );

endmodule
