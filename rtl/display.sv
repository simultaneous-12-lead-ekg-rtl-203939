// display: XVGA timing and VGA output.
//
// A free-running counter pair walks the 1344x806 XVGA frame (1024x768
// visible, 60 Hz at a 65 MHz pixel clock).  hcount_o/vcount_o go to the
// pixel sources; `frame_start_o` pulses at hcount = vcount = 0.  The pixel
// for a given hcount/vcount comes back LATENCY cycles later, so the sync and
// blanking signals are delayed by LATENCY cycles before they leave with it.
// The 32-bit 0x00RRGGBB pixel is cut to the top four bits of each colour
// for the board's 12-bit VGA port; blanked pixels are black.  Both syncs are
// active low, as the 1024x768 standard mode asks.
//
// From the design description: a display module that takes a 32-bit pixel
// from EKG Main and drives a monitor at 1024x768 over VGA with a 65 MHz
// clock.  The timing numbers are the standard XVGA mode; the pixel format
// and the latency alignment are this design's choices.
module display
  import ekg_pkg::*;
#(
  parameter int unsigned LATENCY = PIXEL_LATENCY
) (
  input  logic       clk,
  input  logic       rst,
  input  pixel_t     pixel_i,
  output hcount_t    hcount_o,
  output vcount_t    vcount_o,
  output logic       frame_start_o,
  output logic [3:0] vga_r_o,
  output logic [3:0] vga_g_o,
  output logic [3:0] vga_b_o,
  output logic       vga_hs_o,
  output logic       vga_vs_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount_o <= '0;
      vcount_o <= '0;
    end else if (hcount_o == hcount_t'(H_TOTAL - 1)) begin
      hcount_o <= '0;
      vcount_o <= (vcount_o == vcount_t'(V_TOTAL - 1)) ? '0 : vcount_o + 1'b1;
    end else begin
      hcount_o <= hcount_o + 1'b1;
    end
  end

  logic blank, hs, vs;
  always_comb begin
    blank = (32'(hcount_o) >= H_ACTIVE) || (32'(vcount_o) >= V_ACTIVE);
    hs = !((32'(hcount_o) >= H_ACTIVE + H_FP) && (32'(hcount_o) < H_ACTIVE + H_FP + H_SYNC));
    vs = !((32'(vcount_o) >= V_ACTIVE + V_FP) && (32'(vcount_o) < V_ACTIVE + V_FP + V_SYNC));
    frame_start_o = (hcount_o == '0) && (vcount_o == '0);
  end

  // Delay line: element LATENCY-1 lines up with pixel_i.
  logic [2:0] ctl_q [LATENCY];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY; i++) ctl_q[i] <= 3'b111;  // blank, syncs idle
    end else begin
      ctl_q[0] <= {blank, hs, vs};
      for (int i = 1; i < LATENCY; i++) ctl_q[i] <= ctl_q[i-1];
    end
  end

  logic blank_d;
  assign blank_d = ctl_q[LATENCY-1][2];

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_r_o  <= '0;
      vga_g_o  <= '0;
      vga_b_o  <= '0;
      vga_hs_o <= 1'b1;
      vga_vs_o <= 1'b1;
    end else begin
      vga_r_o  <= blank_d ? 4'h0 : pixel_i[23:20];
      vga_g_o  <= blank_d ? 4'h0 : pixel_i[15:12];
      vga_b_o  <= blank_d ? 4'h0 : pixel_i[7:4];
      vga_hs_o <= ctl_q[LATENCY-1][1];
      vga_vs_o <= ctl_q[LATENCY-1][0];
    end
  end

endmodule
