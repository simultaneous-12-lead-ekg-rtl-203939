// tb_ekg_top_full: the EKG backend at its full default configuration
// (85-cycle switch period, 64-reading averaging, 3000-sample history) taken
// through one complete operation: three seconds of recording and one
// displayed frame.
//
// The behavioural front end gives each electrode a fixed level and V1 a
// heartbeat of 60 beats per minute (high for 100 stored samples out of
// every 1000).  After 3000 stored rounds plus a margin, the test checks that
// every word of the history of the steady leads holds 2048 + (+ level) -
// (- level), that the V1 history holds both beat and rest levels, that the
// pulse logic counts the 3 beats of the 3-second window and shows 60 beats
// per minute, and that in one frame with all twelve leads selected one
// screen column is lit green exactly on the rows of the steady traces.
// About 200 million clock cycles are simulated.
module tb_ekg_top_full;
  import ekg_pkg::*;

  localparam int ROUND = 85 * 12 * 64;   // cycles per stored sample of every lead
  localparam int FRAME = 1344 * 806;
  localparam int XOFF  = 12;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] sw = 12'hFFF;
  logic [7:0]  mux_sel;
  logic        convst, adc_valid, hs, vs, beat, dropped;
  logic [11:0] adc_data, beats;
  logic [3:0]  r, g, b;
  logic [15:0] rate;
  int          elec [10];

  ekg_top u_dut (
    .clk, .rst, .sw_i(sw), .mux_sel_o(mux_sel), .adc_convst_o(convst),
    .adc_data_i(adc_data), .adc_valid_i(adc_valid),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_o(hs), .vga_vs_o(vs),
    .rate_o(rate), .beats_o(beats), .beat_o(beat), .dropped_o(dropped)
  );

  adc_model #(.CONV_CYCLES(26)) u_adc (
    .clk, .mux_sel, .convst, .elec, .extra_delay(0), .data(adc_data), .valid(adc_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int level [10] = '{-300, 200, 500, 0, 150, 300, 450, 600, 750, 0};
  int pos_of [12] = '{1, 2, 2, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int neg_of [12] = '{0, 0, 1, 9, 9, 9, 9, 9, 9, 9, 9, 9};
  function automatic int lead_value(int l);
    return 2048 + level[pos_of[l]] - level[neg_of[l]];
  endfunction

  // V1 heartbeat, 1 beat per 1000 stored rounds (1 s), high for 100 rounds.
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 1000 * ROUND - 1) ? 0 : phase + 1;
    elec[3] <= (phase < 100 * ROUND) ? 1800 : 0;
  end

  int drops = 0;
  always @(posedge clk) if (!rst && dropped) drops++;

  initial begin
    for (int e = 0; e < 10; e++) elec[e] = level[e];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3050 * ROUND) @(posedge clk);

    for (int l = 0; l < 12; l++) begin
      if (l == 6) continue;
      for (int p = 0; p < 3000; p++)
        check(int'(u_dut.u_mem.mem[l * 3000 + p]) == lead_value(l), "stored steady lead");
    end
    begin
      int hi_n, lo_n;
      hi_n = 0; lo_n = 0;
      for (int p = 0; p < 3000; p++) begin
        if (u_dut.u_mem.mem[6 * 3000 + p] == 12'(2048 + 1800)) hi_n++;
        if (u_dut.u_mem.mem[6 * 3000 + p] == 12'(2048)) lo_n++;
      end
      check(hi_n >= 290 && hi_n <= 300, "V1 beat samples");
      check(lo_n >= 2690 && lo_n <= 2710, "V1 rest samples");
    end
    check(beats == 12'd3, "three beats in three seconds");
    check(rate == 16'd60, "60 beats per minute");
    check(drops == 0, "no conversion dropped");

    // one frame, all twelve leads, column 10 of the traces
    begin
      int p, h, v, k, y;
      // cycles since reset release, the pins lagging hcount by four
      p = 3050 * ROUND;
      while (((p - 4) % FRAME) != 0) begin @(negedge clk); p++; end
      for (int c = 0; c < FRAME; c++) begin
        @(negedge clk);
        h = c % 1344;
        v = c / 1344;
        if (h == XOFF + 10 && v < 768) begin
          k = v / 64;
          y = 64 * k + 63 - (lead_value(k) * 64) / 4096;
          if (k != 6) check((g == 4'hF) == (v == y), "twelve-lead trace row");
        end
        p++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3060 * ROUND + 3 * FRAME) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
