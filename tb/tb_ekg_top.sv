// tb_ekg_top: end-to-end test of the EKG backend at reduced sizes.
//
// A behavioural front end (adc_model) gives each electrode a fixed level,
// except V1, which carries a square "heartbeat".  The backend runs with a
// 24-cycle switch period, 2-reading averaging and a 60-sample history, so
// the memory fills in a few tens of thousands of cycles.  One conversion
// window is made late on purpose so that a reading is dropped.
//
// Checked: every lead's electrode pair is selected; after the history has
// filled, every stored sample of every steady lead equals 2048 + (+ level)
// - (- level); the beat count and heart rate equal those of a reference
// detector fed from the stored V1 samples; and in two full frames, with
// lead II alone and then with all twelve leads selected, one screen column
// of the VGA output is lit green exactly on the rows where the traces of
// the steady leads must lie, while red heart-rate digits appear.  The test
// keeps its own pixel position from reset, four cycles ahead of the pins.
// It also counts each mechanism (lead switch, conversion, drop, stored
// sample, history wrap, beat, one-lead and twelve-lead frames) and fails if
// one never happened.
module tb_ekg_top;
  import ekg_pkg::*;

  localparam int SWITCH = 24;
  localparam int DLOG2  = 1;
  localparam int DEPTH  = 60;
  localparam int RUN    = 3;
  localparam int THR    = 3072;
  localparam int ROUND  = SWITCH * 12 * (1 << DLOG2);  // cycles per stored round
  localparam int COLS   = DEPTH / 3;
  localparam int XOFF   = (1024 - COLS) / 2;
  localparam int FRAME  = 1344 * 806;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] sw = 12'h002;
  logic [7:0]  mux_sel;
  logic        convst, adc_valid, hs, vs, beat, dropped;
  logic [11:0] adc_data, beats;
  logic [3:0]  r, g, b;
  logic [15:0] rate;
  int          elec [10];
  int          extra_delay = 0;

  ekg_top #(
    .SWITCH_CYCLES(SWITCH), .SETTLE_CYCLES(4), .DECIM_LOG2(DLOG2),
    .DEPTH(DEPTH), .THRESHOLD(THR), .LOW_RUN(RUN), .RATE_MULT(20)
  ) u_dut (
    .clk, .rst, .sw_i(sw), .mux_sel_o(mux_sel), .adc_convst_o(convst),
    .adc_data_i(adc_data), .adc_valid_i(adc_valid),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_o(hs), .vga_vs_o(vs),
    .rate_o(rate), .beats_o(beats), .beat_o(beat), .dropped_o(dropped)
  );

  adc_model #(.CONV_CYCLES(10)) u_adc (
    .clk, .mux_sel, .convst, .elec, .extra_delay, .data(adc_data), .valid(adc_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // electrode levels: RA LA LL V1 V2..V6 RL
  int level [10] = '{-300, 200, 500, 0, 150, 300, 450, 600, 750, 0};
  int pos_of [12] = '{1, 2, 2, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int neg_of [12] = '{0, 0, 1, 9, 9, 9, 9, 9, 9, 9, 9, 9};
  function automatic int lead_value(int l);
    return 2048 + level[pos_of[l]] - level[neg_of[l]];
  endfunction

  // V1 heartbeat: high for 3 of every 12 stored rounds
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int e = 0; e < 10; e++) elec[e] <= level[e];
    elec[3] <= ((cyc % (12 * ROUND)) < 3 * ROUND) ? 1800 : 0;
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
    if (u_dut.filt_sample.valid) n_store++;
    if (u_dut.oldest == 0 && oldest_prev == 12'(DEPTH - 1)) n_wrap++;
    oldest_prev = u_dut.oldest;
    if (beat) n_beat++;
  end

  // ---- reference beat detector on the stored V1 samples ------------------
  logic ref_win [$];
  logic ref_armed = 1'b1;
  int   ref_low = 0, ref_beats = 0;
  always @(negedge clk) if (!rst) begin
    if (u_dut.value_bus.valid && u_dut.value_bus.lead == 4'd6) begin
      int v;
      logic onset;
      v = int'(u_dut.value_bus.value);
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
  int   pcyc = 0;           // cycles since reset release
  logic check_frame = 1'b0;
  int   frame_sel = 0;      // 1 or 12 leads
  always @(negedge clk) if (!rst) begin
    int p, h, v;
    p = pcyc - 4;
    pcyc++;
    if (check_frame && p >= 0) begin
      h = (p % FRAME) % 1344;
      v = (p % FRAME) / 1344;
      if (r != 0) n_red++;
      if (h == XOFF + 10 && v < 768) begin
        logic want;
        if (frame_sel == 1) begin
          int y;
          y = 767 - (lead_value(1) * 768) / 4096;
          want = (v >= y - 2) && (v <= y + 2);
          check((g == 4'hF) == want, "one-lead trace row");
        end else begin
          int k, y;
          k = v / 64;
          y = 64 * k + 63 - (lead_value(k) * 64) / 4096;
          want = (v == y);
          if (k != 6) check((g == 4'hF) == want, "twelve-lead trace row");
        end
      end
    end
  end

  task automatic wait_frame_start();
    // next cycle at which the pins show pixel (0,0)
    while (((pcyc - 4) % FRAME) != 0 || pcyc < 4) @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < 12; l++) pair_seen[l] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // let the history start filling, then make a few conversions late
    repeat (10 * ROUND) @(negedge clk);
    extra_delay = 40;
    repeat (3 * SWITCH) @(negedge clk);
    extra_delay = 0;
    // fill the whole history with readings taken after the drops
    repeat ((DEPTH + 4) * ROUND) @(negedge clk);

    for (int l = 0; l < 12; l++) begin
      if (l == 6) continue;
      for (int p = 0; p < DEPTH; p++)
        check(int'(u_dut.u_mem.mem[l * DEPTH + p]) == lead_value(l), "stored steady lead");
    end
    check(int'(beats) == ref_beats, "beats match reference");
    check(int'(rate) == 20 * ref_beats, "rate = 20 x beats");
    check(ref_beats >= 4, "beats in the window");

    // frame with lead II alone
    sw = 12'h002;
    wait_frame_start();
    frame_sel = 1;
    check_frame = 1'b1;
    repeat (FRAME) @(negedge clk);
    n_frame1++;
    check(n_red > 0, "heart rate digits drawn");
    // frame with all twelve leads
    sw = 12'hFFF;
    check_frame = 1'b0;
    wait_frame_start();
    frame_sel = 12;
    check_frame = 1'b1;
    repeat (FRAME) @(negedge clk);
    n_frame12++;
    check_frame = 1'b0;
    check(int'(beats) == ref_beats, "beats match reference after frames");

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
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
