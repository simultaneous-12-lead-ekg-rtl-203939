// split_screen: draws the selected leads, one horizontal strip each.
//
// The number of raised selection bits, n, splits the 768 visible rows into n
// strips of floor(768/n) rows; strip k shows the k-th selected lead, counted
// from bit 0.  Each strip shows the lead's whole history as a trace of
// DEPTH/3 columns (1000 by default, every third sample), centred in the
// 1024-pixel line.  Column x shows the sample at position
// view_start + 3*x (mod DEPTH), so the oldest sample is on the left and the
// newest on the right.  A sample s (0..4095) is drawn at row
// top + h - 1 - (s*h >> 12), so full scale fills the strip.
//
// To keep the trace joined when it is steep, a pixel is lit when its row
// lies between the previous column's row and this column's row, widened by a
// half-thickness that shrinks as strips get smaller: 2 rows for strips of
// 192 rows or more (1-4 leads), 1 row down to 96 rows (5-8 leads), 0 below.
//
// Timing: hcount/vcount at cycle t produce rd_addr_o combinationally in the
// same cycle; the memory returns the sample at t+1 and pixel_o is registered
// at t+2 (ekg_pkg::SOURCE_LATENCY).
//
// From the design description: the selection bus, one strip per selected
// lead, every third sample giving a 1000-pixel trace, x advancing by one per
// sample, the 32-bit pixel per 65 MHz cycle, and strips with their own
// bounds, centre and line thickness.  The description keeps a copy of every
// waveform in registers inside this block in one place and reads the
// selected waveforms from EKG Memory in another; this design reads the
// memory's display port and keeps no copy.  The strip order, the joining of
// columns, the thickness steps and the colour are this design's choices.
module split_screen
  import ekg_pkg::*;
#(
  parameter int unsigned DEPTH = HIST_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_LEADS-1:0] select_i,
  input  logic [11:0]          view_start_i, // position of the oldest sample
  input  hcount_t              hcount_i,
  input  vcount_t              vcount_i,
  output logic [15:0]          rd_addr_o,    // to the memory display port
  input  sample_t              rd_data_i,
  output pixel_t               pixel_o
);

  localparam int unsigned COLUMNS = DEPTH / 3;
  localparam int unsigned X_OFF   = (H_ACTIVE - COLUMNS) / 2;

  // Rows per strip for n selected leads.
  function automatic logic [9:0] strip_height(logic [3:0] n);
    logic [9:0] h;
    h = '0;
    for (int i = 1; i <= NUM_LEADS; i++) begin
      if (n == 4'(i)) h = 10'(V_ACTIVE / i);
    end
    return h;
  endfunction

  // ---- stage A: locate the pixel and address the memory -------------------
  logic [3:0]  n_sel;
  logic [9:0]  h_a;
  logic [3:0]  k_a;
  lead_t       lead_a;
  logic        active_a;
  logic [9:0]  x_a;
  logic [12:0] pos_a;
  logic [9:0]  top_a;
  logic [1:0]  half_a;
  logic [3:0]  seen;

  always_comb begin
    n_sel = '0;
    for (int i = 0; i < NUM_LEADS; i++) n_sel = n_sel + 4'(select_i[i]);
    h_a = strip_height(n_sel);

    k_a = '0;
    for (int j = 1; j < NUM_LEADS; j++) begin
      if ((4'(j) < n_sel) && (32'(vcount_i) >= j * 32'(h_a))) k_a = 4'(j);
    end
    top_a = 10'(32'(k_a) * 32'(h_a));

    lead_a = '0;
    seen   = '0;
    for (int i = 0; i < NUM_LEADS; i++) begin
      if (select_i[i]) begin
        if (seen == k_a) lead_a = lead_t'(i);
        seen = seen + 4'd1;
      end
    end

    active_a = (n_sel != 0)
            && (32'(hcount_i) >= X_OFF) && (32'(hcount_i) < X_OFF + COLUMNS)
            && (32'(vcount_i) < 32'(n_sel) * 32'(h_a));
    x_a   = 10'(hcount_i - 11'(X_OFF));
    pos_a = 13'(view_start_i) + 13'(x_a) * 13'd3;
    if (pos_a >= 13'(DEPTH)) pos_a = pos_a - 13'(DEPTH);
    rd_addr_o = 16'(lead_a) * 16'(DEPTH) + 16'(pos_a);

    if (h_a >= 10'd192)     half_a = 2'd2;
    else if (h_a >= 10'd96) half_a = 2'd1;
    else                    half_a = 2'd0;
  end

  // ---- stage B: memory data arrives, decide the pixel ---------------------
  logic       active_b, first_b;
  logic [9:0] top_b, h_b, row_b;
  logic [1:0] half_b;
  logic [9:0] y_prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      active_b <= 1'b0;
      first_b  <= 1'b0;
      top_b    <= '0;
      h_b      <= '0;
      row_b    <= '0;
      half_b   <= '0;
    end else begin
      active_b <= active_a;
      first_b  <= (x_a == 10'd0);
      top_b    <= top_a;
      h_b      <= h_a;
      row_b    <= vcount_i;
      half_b   <= half_a;
    end
  end

  logic [9:0]  y_b;
  logic        lit_b;
  logic [31:0] scaled, lo, hi, yp;
  always_comb begin
    scaled = (32'(rd_data_i) * 32'(h_b)) >> SAMPLE_W;
    y_b    = 10'(32'(top_b) + 32'(h_b) - 1 - scaled);
    yp     = first_b ? 32'(y_b) : 32'(y_prev_q);
    lo     = (yp < 32'(y_b)) ? yp : 32'(y_b);
    hi     = (yp < 32'(y_b)) ? 32'(y_b) : yp;
    lo     = (lo >= 32'(half_b)) ? lo - 32'(half_b) : 0;
    hi     = hi + 32'(half_b);
    lit_b  = active_b && (32'(row_b) >= lo) && (32'(row_b) <= hi);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_prev_q <= '0;
      pixel_o  <= '0;
    end else begin
      if (active_b) y_prev_q <= y_b;
      pixel_o <= lit_b ? TRACE_COLOUR : '0;
    end
  end

endmodule
