// tb_ekg_system: end-to-end test of the whole EKG, analog models included.
//
// Nine electrode voltages, each a fixed level of a few tenths of a
// millivolt plus 60 Hz mains hum of 0.2 to 0.6 mV (different on each wire),
// drive the system.  V1 also carries a 0.9 mV "heartbeat", 30 ms long every
// 100 ms.  A 12-bit ADC model on 0..1 V closes the loop.  The backend runs
// at its default polling, averaging and clock (about 65 MHz), with a
// 300-sample (300 ms) history and a 10-sample re-arm for beat detection.
// One conversion is made late on purpose at 20 ms.
//
// Checked, after the notch filters have settled:
//  * every stored sample of every steady lead lies within 3 codes of
//    floor(4096 * (0.5 + 499 * (v+ - v-))) for its electrode pair, with the
//    hum gone;
//  * the beat count and the rate match a reference detector fed from the
//    stored V1 samples;
//  * in a frame with lead II alone and in one with all twelve leads, one
//    screen column is lit only near the rows where the steady traces must
//    lie;
//  * red heart-rate digits appear.
// Each mechanism is counted, and the test fails if one never happened: every
// lead pair selected, conversions, the forced drop, stored samples, history
// wrap, beats, and the two display modes.
module tb_ekg_system;
  import ekg_pkg::*;

  localparam real PI    = 3.141592653589793;
  localparam int  DEPTH = 300;
  localparam int  RUN   = 10;
  localparam int  THR   = 3072;
  localparam int  COLS  = DEPTH / 3;
  localparam int  XOFF  = (1024 - COLS) / 2;
  localparam int  FRAME = 1344 * 806;

  logic clk = 1'b0, rst = 1'b1;
  always #7.692 clk = ~clk;

  logic [11:0] sw = 12'h002, adc_data, beats;
  logic [7:0]  mux_sel;
  logic        convst, adc_valid, hs, vs, beat, dropped;
  logic [3:0]  r, g, b;
  logic [15:0] rate;
  real         elec [9];
  real         amp;
  int          extra_delay = 0;

  ekg_system #(.DEPTH(DEPTH), .LOW_RUN(RUN)) u_dut (
    .clk, .rst, .elec_i(elec), .amp_o(amp), .adc_convst_o(convst),
    .adc_data_i(adc_data), .adc_valid_i(adc_valid), .sw_i(sw), .mux_sel_o(mux_sel),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_o(hs), .vga_vs_o(vs),
    .rate_o(rate), .beats_o(beats), .beat_o(beat), .dropped_o(dropped)
  );

  xadc_model #(.CONV_CYCLES(26)) u_adc (
    .clk, .convst, .vin(amp), .extra_delay, .data(adc_data), .valid(adc_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // RA LA LL V1..V6, millivolts
  real dc_mv  [9] = '{-0.30, 0.20, 0.50, 0.10, 0.25, 0.40, 0.55, 0.70, 0.85};
  int  pos_of [12] = '{1, 2, 2, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int  neg_of [12] = '{0, 0, 1, 9, 9, 9, 9, 9, 9, 9, 9, 9};

  function automatic real level(int e);
    return (e == 9) ? 0.0 : dc_mv[e] * 1.0e-3;
  endfunction
  function automatic int expected(int l);
    return int'($floor(4096.0 * (0.5 + 499.0 * (level(pos_of[l]) - level(neg_of[l])))));
  endfunction

  // electrode waveforms, updated every 10 us
  initial begin
    forever begin
      real t;
      t = real'($time) * 1.0e-9;
      for (int e = 0; e < 9; e++)
        elec[e] = dc_mv[e] * 1.0e-3 + (0.2e-3 + 0.05e-3 * e) * $sin(2.0 * PI * 60.0 * t + e);
      if ((t - 0.1 * $floor(t / 0.1)) < 0.03) elec[3] = elec[3] + 0.9e-3;
      #(10us);
    end
  end

  // ---- mechanism counters ----------------------------------------------
  int pair_seen [12];
  int n_conv = 0, n_drop = 0, n_store = 0, n_wrap = 0, n_beat = 0;
  int n_frame1 = 0, n_frame12 = 0, n_red = 0;
  logic [11:0] oldest_prev = '0;
  always @(negedge clk) if (!rst) begin
    for (int l = 0; l < 12; l++)
      if (mux_sel == {4'(neg_of[l]), 4'(pos_of[l])}) pair_seen[l]++;
    if (adc_valid) n_conv++;
    if (dropped) n_drop++;
    if (u_dut.u_backend.filt_sample.valid) n_store++;
    if (u_dut.u_backend.oldest == 0 && oldest_prev == 12'(DEPTH - 1)) n_wrap++;
    oldest_prev = u_dut.u_backend.oldest;
    if (beat) n_beat++;
  end

  // ---- reference beat detector on the stored V1 samples ------------------
  logic ref_win [$];
  logic ref_armed = 1'b1;
  int   ref_low = 0, ref_beats = 0;
  always @(negedge clk) if (!rst) begin
    if (u_dut.u_backend.value_bus.valid && u_dut.u_backend.value_bus.lead == 4'd6) begin
      int v;
      logic onset;
      v = int'(u_dut.u_backend.value_bus.value);
      onset = ref_armed && v >= THR;
      if (onset) begin ref_armed = 1'b0; ref_low = 0; end
      else if (!ref_armed) begin
        if (v >= THR) ref_low = 0;
        else begin ref_low++; if (ref_low >= RUN) begin ref_armed = 1'b1; ref_low = 0; end end
      end
      ref_win.push_back(onset);
      if (ref_win.size() > DEPTH) void'(ref_win.pop_front());
      ref_beats = 0;
      foreach (ref_win[i]) ref_beats += int'(ref_win[i]);
    end
  end

  // ---- VGA column check --------------------------------------------------
  // The pins show the pixel of hcount/vcount four cycles earlier.
  int   pcyc = 0;
  logic check_frame = 1'b0;
  int   frame_sel = 0;
  int   lit_in_strip [12];
  always @(negedge clk) if (!rst) begin
    int p, h, v, k, y;
    p = pcyc - 4;
    pcyc++;
    if (check_frame && p >= 0) begin
      h = (p % FRAME) % 1344;
      v = (p % FRAME) / 1344;
      if (r != 0) n_red++;
      if (h == XOFF + 10 && v < 768) begin
        if (frame_sel == 1) begin
          y = 767 - (expected(1) * 768) / 4096;
          if (g == 4'hF) begin
            lit_in_strip[0]++;
            check(v >= y - 3 && v <= y + 3, "one-lead trace row");
          end
        end else begin
          k = v / 64;
          y = 64 * k + 63 - (expected(k) * 64) / 4096;
          if (k != 6 && g == 4'hF) begin
            lit_in_strip[k]++;
            check(v >= y - 1 && v <= y + 1, "twelve-lead trace row");
          end
        end
      end
    end
  end

  task automatic wait_frame_start();
    while (((pcyc - 4) % FRAME) != 0 || pcyc < 4) @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < 12; l++) begin pair_seen[l] = 0; lit_in_strip[l] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #(20ms);
    extra_delay = 100;
    repeat (85) @(posedge clk);
    extra_delay = 0;
    #(430ms);
    for (int l = 0; l < 12; l++) begin
      if (l == 6) continue;
      for (int p = 0; p < DEPTH; p++) begin
        int v;
        v = int'(u_dut.u_backend.u_mem.mem[l * DEPTH + p]);
        check(v - expected(l) <= 3 && expected(l) - v <= 3, "settled lead level");
      end
    end
    check(int'(beats) == ref_beats, "beats match reference");
    check(int'(rate) == 20 * ref_beats, "rate = 20 x beats");
    check(ref_beats == 3, "three beats in the 300 ms window");

    sw = 12'h002;
    wait_frame_start();
    frame_sel = 1;
    check_frame = 1'b1;
    repeat (FRAME) @(negedge clk);
    n_frame1++;
    check(lit_in_strip[0] >= 3, "one-lead trace present");
    check(n_red > 0, "heart rate digits drawn");
    sw = 12'hFFF;
    check_frame = 1'b0;
    wait_frame_start();
    frame_sel = 12;
    check_frame = 1'b1;
    repeat (FRAME) @(negedge clk);
    n_frame12++;
    check_frame = 1'b0;
    for (int k = 0; k < 12; k++) if (k != 6) check(lit_in_strip[k] >= 1, "twelve-lead trace present");

    for (int l = 0; l < 12; l++) check(pair_seen[l] > 0, "lead pair selected");
    check(n_conv > 0, "conversions");
    check(n_drop > 0, "dropped conversion");
    check(n_store >= 12 * DEPTH, "stored samples");
    check(n_wrap > 0, "history wrapped");
    check(n_beat > 0, "beats detected");
    check(n_frame1 > 0 && n_frame12 > 0, "both display modes");
    $display("mechanisms: conv=%0d drop=%0d store=%0d wrap=%0d beat=%0d frames=%0d/%0d red=%0d",
             n_conv, n_drop, n_store, n_wrap, n_beat, n_frame1, n_frame12, n_red);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
