// tb_display: self-checking test of the XVGA timing and VGA output.
//
// The pixel source in the test answers every hcount/vcount with a word made
// from them, three cycles late as EKG Main would.  Over two frames the test
// checks the 1344x806 counter wrap, the frame start pulse, the sync pulse
// positions and widths, and that each VGA colour is the top nibble of the
// matching pixel byte inside the picture and black outside it.
module tb_display;
  import ekg_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  pixel_t     pixel;
  hcount_t    hcount;
  vcount_t    vcount;
  logic       frame_start, hs, vs;
  logic [3:0] r, g, b;

  display dut (
    .clk, .rst, .pixel_i(pixel), .hcount_o(hcount), .vcount_o(vcount),
    .frame_start_o(frame_start), .vga_r_o(r), .vga_g_o(g), .vga_b_o(b),
    .vga_hs_o(hs), .vga_vs_o(vs)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Pixel source with three cycles of latency.
  pixel_t src [3];
  always_ff @(posedge clk) begin
    src[0] <= {8'h00, 8'(hcount), 8'(vcount), 8'(hcount ^ 11'(vcount))};
    src[1] <= src[0];
    src[2] <= src[1];
  end
  assign pixel = src[2];

  // Expected outputs: the VGA pins lag hcount/vcount by four cycles.
  int h_hist [5], v_hist [5];
  int frames = 0, hs_low = 0, vs_rows = 0, cyc = 0;
  logic hs_prev = 1'b1;

  always @(negedge clk) if (!rst) begin
    int h, v;
    for (int i = 4; i > 0; i--) begin h_hist[i] = h_hist[i-1]; v_hist[i] = v_hist[i-1]; end
    h_hist[0] = int'(hcount);
    v_hist[0] = int'(vcount);
    cyc++;
    // counters
    check(frame_start == (hcount == 0 && vcount == 0), "frame start");
    if (cyc > 5) begin
      if (frame_start) frames++;
      h = h_hist[4];
      v = v_hist[4];
      check(hs == !(h >= 1048 && h < 1184), "hsync");
      check(vs == !(v >= 771 && v < 777), "vsync");
      if (h < 1024 && v < 768) begin
        check(r == 4'(8'(h) >> 4) && g == 4'(8'(v) >> 4) && b == 4'(8'(h ^ v) >> 4), "colour");
      end else begin
        check(r == 0 && g == 0 && b == 0, "blank black");
      end
      if (!hs) hs_low++;
    end
  end

  // Counter ranges and wraps, checked on every edge.
  hcount_t h_last;
  vcount_t v_last;
  always @(posedge clk) if (!rst) begin
    #1;
    check(hcount < 1344 && vcount < 806, "counter range");
    if (h_last == 1343) check(hcount == 0 && (vcount == ((v_last == 805) ? 0 : v_last + 1)), "line wrap");
    else                check(hcount == h_last + 1 && vcount == v_last, "count up");
    h_last = hcount;
    v_last = vcount;
  end

  initial begin
    repeat (3) @(negedge clk);
    h_last = 11'd0;
    v_last = 10'd0;
    rst = 1'b0;
    repeat (2 * 1344 * 806 + 10) @(negedge clk);
    check(frames == 2, "two frames started");
    check(hs_low == 2 * 806 * 136, "hsync width over two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
