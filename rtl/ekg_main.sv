// ekg_main: the system controller (EKG Main).
//
// EKG Main ties the user switches, the recorder and the two pixel sources
// together:
//  * it registers the twelve lead switches every clock and hands them to the
//    split screen logic as the lead selection;
//  * it registers the bitwise OR of the split screen pixel and the pulse
//    logic pixel and sends it to the display (one cycle of latency);
//  * it counts SWITCH_CYCLES clocks between one-cycle `rec_switch_o` pulses
//    that tell the recorder to move to the next lead (85 cycles at 65 MHz is
//    about 765 kS/s through the ADC, below its 1 MS/s limit);
//  * at the start of every frame it samples the memory's oldest-sample
//    position and passes it to the split screen logic as `view_start_o`, so
//    that a whole frame is drawn from one view of the history.
//
// The switch register, the pixel OR and the switch timing follow the design
// description; the switch period and the per-frame view position are this
// design's own choices.
module ekg_main
  import ekg_pkg::*;
#(
  parameter int unsigned SWITCH_CYCLES = 85
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_LEADS-1:0] sw_i,          // selector switches
  input  pixel_t               pix_split_i,   // from split screen logic
  input  pixel_t               pix_pulse_i,   // from pulse logic
  input  logic [11:0]          mem_oldest_i,  // memory write position
  input  logic                 frame_start_i, // from the display timing
  output logic [NUM_LEADS-1:0] select_o,      // to split screen logic
  output logic [11:0]          view_start_o,  // to split screen logic
  output pixel_t               pixel_o,       // to the display
  output logic                 rec_switch_o   // to the recorder
);

  localparam int unsigned CNT_W = $clog2(SWITCH_CYCLES);

  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      select_o     <= '0;
      view_start_o <= '0;
      pixel_o      <= '0;
      rec_switch_o <= 1'b0;
      cnt_q        <= '0;
    end else begin
      select_o <= sw_i;
      pixel_o  <= pix_split_i | pix_pulse_i;
      if (frame_start_i) view_start_o <= mem_oldest_i;
      if (cnt_q == CNT_W'(SWITCH_CYCLES - 1)) begin
        cnt_q        <= '0;
        rec_switch_o <= 1'b1;
      end else begin
        cnt_q        <= cnt_q + 1'b1;
        rec_switch_o <= 1'b0;
      end
    end
  end

endmodule
