// pulse_logic: heart rate from lead V1, drawn in the top right corner.
//
// The block watches the memory's value bus for samples of PULSE_LEAD (V1).
// A sample at or above THRESHOLD is high.  The first high sample while the
// detector is armed is a beat onset; the detector then disarms and re-arms
// only after LOW_RUN consecutive low samples, so the high samples of one beat
// count once.  A DEPTH-bit shift window (3 s of samples) records which
// samples were onsets and a running count of the ones in the window gives
// the beats of the last 3 seconds; times RATE_MULT (20 = 60 s / 3 s) that is
// the heart rate in beats per minute.
//
// The rate is drawn as up to three seven-segment digits (24x40 pixels,
// 4-pixel strokes, leading zeros blank) in the top right corner of the
// screen; rates above 999 show 999.  pixel_o follows hcount/vcount by two
// cycles (ekg_pkg::SOURCE_LATENCY), matching the split screen logic.
//
// From the design description: input from the memory's value bus, beats
// seen as high values, one beat for a run of highs with a run of lows
// needed before the next, the count over the last 3 seconds times 20, and
// the rate drawn in the top right.  The threshold, the run length, the
// digit font and the colour are this design's choices.
module pulse_logic
  import ekg_pkg::*;
#(
  parameter int unsigned DEPTH      = HIST_DEPTH,
  parameter int unsigned THRESHOLD  = 3072,
  parameter int unsigned LOW_RUN    = 40,
  parameter int unsigned RATE_MULT  = 20,
  parameter int unsigned PULSE_LEAD = 6       // LEAD_V1
) (
  input  logic         clk,
  input  logic         rst,
  input  lead_sample_t value_i,       // memory value bus
  input  hcount_t      hcount_i,
  input  vcount_t      vcount_i,
  output pixel_t       pixel_o,
  output logic         beat_o,        // one cycle per detected onset
  output logic [11:0]  beats_o,       // onsets in the window
  output logic [15:0]  rate_o         // beats per minute
);

  localparam int unsigned RUN_W = $clog2(LOW_RUN + 1);
  localparam int unsigned POS_W = $clog2(DEPTH);

  // ---- beat detection -----------------------------------------------------
  logic              armed_q;
  logic [RUN_W-1:0]  low_run_q;
  logic [DEPTH-1:0]  window_q;
  logic [POS_W-1:0]  pos_q;

  logic take, high, onset;
  assign take  = value_i.valid && (value_i.lead == lead_t'(PULSE_LEAD));
  assign high  = (32'(value_i.value) >= THRESHOLD);
  assign onset = armed_q && high;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed_q   <= 1'b1;
      low_run_q <= '0;
      window_q  <= '0;
      pos_q     <= '0;
      beats_o   <= '0;
      beat_o    <= 1'b0;
    end else begin
      beat_o <= 1'b0;
      if (take) begin
        if (onset) begin
          armed_q   <= 1'b0;
          low_run_q <= '0;
          beat_o    <= 1'b1;
        end else if (!armed_q) begin
          if (high) begin
            low_run_q <= '0;
          end else if (32'(low_run_q) + 1 >= LOW_RUN) begin
            armed_q   <= 1'b1;
            low_run_q <= '0;
          end else begin
            low_run_q <= low_run_q + 1'b1;
          end
        end
        window_q[pos_q] <= onset;
        beats_o <= beats_o + 12'(onset) - 12'(window_q[pos_q]);
        pos_q   <= (32'(pos_q) == DEPTH - 1) ? '0 : pos_q + 1'b1;
      end
    end
  end

  // ---- rate and its decimal digits ----------------------------------------
  logic [9:0] shown;
  logic [3:0] dig_q [3];   // hundreds, tens, units
  always_ff @(posedge clk) begin
    if (rst) begin
      rate_o <= '0;
      for (int i = 0; i < 3; i++) dig_q[i] <= '0;
    end else begin
      rate_o   <= 16'(32'(beats_o) * RATE_MULT);
      dig_q[0] <= 4'(shown / 10'd100);
      dig_q[1] <= 4'((shown / 10'd10) % 10'd10);
      dig_q[2] <= 4'(shown % 10'd10);
    end
  end
  assign shown = (rate_o > 16'd999) ? 10'd999 : 10'(rate_o);

  // ---- seven-segment rendering --------------------------------------------
  localparam int unsigned DIG_W  = 24;
  localparam int unsigned DIG_H  = 40;
  localparam int unsigned STROKE = 4;
  localparam int unsigned GAP    = 8;
  localparam int unsigned X0     = H_ACTIVE - 16 - 3 * DIG_W - 2 * GAP;
  localparam int unsigned Y0     = 16;

  // Segments {g,f,e,d,c,b,a} of a decimal digit.
  function automatic logic [6:0] segments(logic [3:0] d);
    unique case (d)
      4'd0: return 7'h3F;  4'd1: return 7'h06;  4'd2: return 7'h5B;
      4'd3: return 7'h4F;  4'd4: return 7'h66;  4'd5: return 7'h6D;
      4'd6: return 7'h7D;  4'd7: return 7'h07;  4'd8: return 7'h7F;
      4'd9: return 7'h6F;  default: return 7'h00;
    endcase
  endfunction

  logic lit_a, lit_q;
  logic [31:0] hx, vy, lx, ly, d;
  logic [6:0]  seg;
  logic        show;
  always_comb begin
    lit_a = 1'b0;
    d = 0; lx = 0; ly = 0; show = 1'b0; seg = '0;
    hx = 32'(hcount_i);
    vy = 32'(vcount_i);
    if (hx >= X0 && hx < X0 + 3 * DIG_W + 2 * GAP && vy >= Y0 && vy < Y0 + DIG_H) begin
      d  = (hx - X0) / (DIG_W + GAP);
      lx = (hx - X0) % (DIG_W + GAP);
      ly = vy - Y0;
      show = (d == 2) || (d == 1 && (dig_q[0] != 0 || dig_q[1] != 0)) || (d == 0 && dig_q[0] != 0);
      seg  = show ? segments(dig_q[d[1:0]]) : 7'h00;
      if (lx < DIG_W) begin
        lit_a = (seg[0] && ly < STROKE)
             || (seg[1] && lx >= DIG_W - STROKE && ly <  DIG_H / 2)
             || (seg[2] && lx >= DIG_W - STROKE && ly >= DIG_H / 2)
             || (seg[3] && ly >= DIG_H - STROKE)
             || (seg[4] && lx < STROKE && ly >= DIG_H / 2)
             || (seg[5] && lx < STROKE && ly <  DIG_H / 2)
             || (seg[6] && ly >= DIG_H / 2 - STROKE / 2 && ly < DIG_H / 2 + STROKE / 2);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lit_q   <= 1'b0;
      pixel_o <= '0;
    end else begin
      lit_q   <= lit_a;
      pixel_o <= lit_q ? RATE_COLOUR : '0;
    end
  end

endmodule
