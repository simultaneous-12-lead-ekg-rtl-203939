// ekg_pkg: types and constants shared by the 12-lead EKG backend.
//
// The backend records twelve virtual leads through one 12-bit ADC, keeps
// three seconds of each lead at about 1 kS/s and draws the selected leads on
// a 1024x768 XVGA screen.  This package holds the sample and pixel types, the
// lead numbering, the electrode pair that forms each lead, and the XVGA
// timing.  The twelve leads, the 12-bit sample, the 32-bit pixel, the
// 3-second history, the 1000-pixel trace and the 1024x768 screen follow the
// design description; the lead order, the electrode numbering and the mux
// select encoding are this design's own choices.
package ekg_pkg;

  localparam int unsigned NUM_LEADS  = 12;   // virtual leads, one switch each
  localparam int unsigned SAMPLE_W   = 12;   // ADC resolution
  localparam int unsigned PIXEL_W    = 32;   // pixel word passed to EKG Main
  localparam int unsigned HIST_DEPTH = 3000; // 3 s of history per lead at 1 kS/s
  localparam int unsigned ELEC_SEL_W = 4;    // select width of one analog mux

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [PIXEL_W-1:0]  pixel_t;
  typedef logic [3:0]          lead_t;
  typedef logic [ELEC_SEL_W-1:0] elec_t;

  // Virtual lead numbers; switch bit i selects lead i for display.
  typedef enum logic [3:0] {
    LEAD_I   = 4'd0,  LEAD_II  = 4'd1,  LEAD_III = 4'd2,
    LEAD_AVR = 4'd3,  LEAD_AVL = 4'd4,  LEAD_AVF = 4'd5,
    LEAD_V1  = 4'd6,  LEAD_V2  = 4'd7,  LEAD_V3  = 4'd8,
    LEAD_V4  = 4'd9,  LEAD_V5  = 4'd10, LEAD_V6  = 4'd11
  } lead_e;

  // Electrode numbers on the analog mux inputs.  RL is the grounded wire and
  // is the reference of the leads that are not taken between two limbs.
  typedef enum logic [3:0] {
    ELEC_RA = 4'd0, ELEC_LA = 4'd1, ELEC_LL = 4'd2,
    ELEC_V1 = 4'd3, ELEC_V2 = 4'd4, ELEC_V3 = 4'd5,
    ELEC_V4 = 4'd6, ELEC_V5 = 4'd7, ELEC_V6 = 4'd8,
    ELEC_RL = 4'd9
  } elec_e;

  // Both mux selects: pos drives the amplifier's + input, neg its - input.
  typedef struct packed {
    elec_t neg;  // mux_sel[7:4]
    elec_t pos;  // mux_sel[3:0]
  } mux_sel_t;

  // A sample tagged with the lead it belongs to.
  typedef struct packed {
    logic    valid;
    lead_t   lead;
    sample_t value;
  } lead_sample_t;

  // Electrode pair measured for each virtual lead.
  function automatic mux_sel_t lead_pair(lead_t lead);
    mux_sel_t p;
    unique case (lead)
      LEAD_I:   p = '{neg: ELEC_RA, pos: ELEC_LA};
      LEAD_II:  p = '{neg: ELEC_RA, pos: ELEC_LL};
      LEAD_III: p = '{neg: ELEC_LA, pos: ELEC_LL};
      LEAD_AVR: p = '{neg: ELEC_RL, pos: ELEC_RA};
      LEAD_AVL: p = '{neg: ELEC_RL, pos: ELEC_LA};
      LEAD_AVF: p = '{neg: ELEC_RL, pos: ELEC_LL};
      LEAD_V1:  p = '{neg: ELEC_RL, pos: ELEC_V1};
      LEAD_V2:  p = '{neg: ELEC_RL, pos: ELEC_V2};
      LEAD_V3:  p = '{neg: ELEC_RL, pos: ELEC_V3};
      LEAD_V4:  p = '{neg: ELEC_RL, pos: ELEC_V4};
      LEAD_V5:  p = '{neg: ELEC_RL, pos: ELEC_V5};
      LEAD_V6:  p = '{neg: ELEC_RL, pos: ELEC_V6};
      default:  p = '{neg: ELEC_RL, pos: ELEC_RL};
    endcase
    return p;
  endfunction

  // XVGA 1024x768 at 60 Hz from a 65 MHz pixel clock.
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned H_FP     = 24;
  localparam int unsigned H_SYNC   = 136;
  localparam int unsigned H_BP     = 160;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP; // 1344
  localparam int unsigned V_ACTIVE = 768;
  localparam int unsigned V_FP     = 3;
  localparam int unsigned V_SYNC   = 6;
  localparam int unsigned V_BP     = 29;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP; // 806

  typedef logic [10:0] hcount_t;
  typedef logic [9:0]  vcount_t;

  // Clock cycles from hcount/vcount to the pixel leaving the pixel sources
  // (split screen and pulse logic), and to it leaving EKG Main.
  localparam int unsigned SOURCE_LATENCY = 2;
  localparam int unsigned PIXEL_LATENCY  = SOURCE_LATENCY + 1;

  // Pixel colours, 0x00RRGGBB.
  localparam pixel_t TRACE_COLOUR = 32'h0000_FF00;
  localparam pixel_t RATE_COLOUR  = 32'h00FF_0000;

endpackage
