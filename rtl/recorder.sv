// recorder: polls the twelve virtual leads through the two analog muxes and
// the ADC.
//
// Each one-cycle pulse on `switch_i` (timed by EKG Main) moves the recorder
// to the next virtual lead, 0..11 and round again.  It sets both analog mux
// selects to the electrode pair of that lead (ekg_pkg::lead_pair), waits
// SETTLE_CYCLES for the mux and amplifier to settle, then pulses
// `adc_convst_o` once.  When the ADC answers with `adc_valid_i`, the
// conversion is sent on as one `sample_o` beat tagged with the lead.  If the
// next switch pulse comes before the ADC has answered, the conversion is
// abandoned and `dropped_o` pulses; the lead still moves on.
//
// Interface: mux_sel_o[3:0] selects the electrode on the amplifier's +
// input, mux_sel_o[7:4] the one on its - input.  sample_o is registered and
// is valid for one cycle.
//
// From the design description: switching on a strobe from EKG Main, polling
// all virtual leads through one ADC, two muxes selecting the two amplifier
// inputs, and tagging each reading with its lead.  The settle wait, the
// start/valid handshake with the ADC and the drop on a late answer are this
// design's own choices.
module recorder
  import ekg_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         switch_i,     // move to the next lead
  output mux_sel_t     mux_sel_o,    // [7:4] - input, [3:0] + input
  output logic         adc_convst_o, // start one conversion
  input  sample_t      adc_data_i,
  input  logic         adc_valid_i,
  output lead_sample_t sample_o,
  output logic         dropped_o     // a conversion was abandoned
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_CONVERT} state_e;

  state_e state_q;
  lead_t  lead_q;
  logic [$clog2(SETTLE_CYCLES+1)-1:0] settle_q;

  lead_t next_lead;
  assign next_lead = (lead_q == lead_t'(NUM_LEADS - 1)) ? lead_t'(0) : lead_q + lead_t'(1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_IDLE;
      lead_q       <= lead_t'(NUM_LEADS - 1);  // first switch selects lead 0
      settle_q     <= '0;
      adc_convst_o <= 1'b0;
      sample_o     <= '0;
      dropped_o    <= 1'b0;
    end else begin
      adc_convst_o <= 1'b0;
      sample_o     <= '0;
      dropped_o    <= 1'b0;
      if (switch_i) begin
        lead_q    <= next_lead;
        settle_q  <= '0;
        state_q   <= S_SETTLE;
        dropped_o <= (state_q != S_IDLE);
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_SETTLE: begin
            if (settle_q == SETTLE_CYCLES[$bits(settle_q)-1:0]) begin
              adc_convst_o <= 1'b1;
              state_q      <= S_CONVERT;
            end else begin
              settle_q <= settle_q + 1'b1;
            end
          end
          S_CONVERT: begin
            if (adc_valid_i) begin
              sample_o <= '{valid: 1'b1, lead: lead_q, value: adc_data_i};
              state_q  <= S_IDLE;
            end
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

  assign mux_sel_o = lead_pair(lead_q);

endmodule
