// tb_ekg_system_full: the whole EKG at its full default configuration
// (85-cycle switch period, 64-reading averaging, 3000-sample history,
// 40-sample re-arm), analog models included, taken through one complete
// operation: 3.2 seconds of recording and one displayed frame.
//
// The electrodes carry fixed levels plus 60 Hz hum of 0.2 to 0.6 mV, and V1
// carries a 60 beats-per-minute heartbeat of 0.9 mV, 100 ms long every
// second.  After 3.2 s the history covers 0.2..3.2 s, well after the notch
// filters have settled.  The test checks that every stored sample of every
// steady lead lies within 3 codes of floor(4096 * (0.5 + 499 * (v+ - v-))),
// that the pulse logic counts the 3 beats of the window and shows 60 beats
// per minute, that no conversion was dropped, and that in a frame with all
// twelve leads one screen column is lit only within a row of where each
// steady trace must lie.  About 210 million clock cycles are simulated.
module tb_ekg_system_full;
  import ekg_pkg::*;

  localparam real PI    = 3.141592653589793;
  localparam int  FRAME = 1344 * 806;
  localparam int  XOFF  = 12;

  logic clk = 1'b0, rst = 1'b1;
  always #7.692 clk = ~clk;

  logic [11:0] sw = 12'hFFF, adc_data, beats;
  logic [7:0]  mux_sel;
  logic        convst, adc_valid, hs, vs, beat, dropped;
  logic [3:0]  r, g, b;
  logic [15:0] rate;
  real         elec [9];
  real         amp;

  ekg_system u_dut (
    .clk, .rst, .elec_i(elec), .amp_o(amp), .adc_convst_o(convst),
    .adc_data_i(adc_data), .adc_valid_i(adc_valid), .sw_i(sw), .mux_sel_o(mux_sel),
    .vga_r_o(r), .vga_g_o(g), .vga_b_o(b), .vga_hs_o(hs), .vga_vs_o(vs),
    .rate_o(rate), .beats_o(beats), .beat_o(beat), .dropped_o(dropped)
  );

  xadc_model #(.CONV_CYCLES(26)) u_adc (
    .clk, .convst, .vin(amp), .extra_delay(0), .data(adc_data), .valid(adc_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  real dc_mv  [9] = '{-0.30, 0.20, 0.50, 0.10, 0.25, 0.40, 0.55, 0.70, 0.85};
  int  pos_of [12] = '{1, 2, 2, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int  neg_of [12] = '{0, 0, 1, 9, 9, 9, 9, 9, 9, 9, 9, 9};

  function automatic real level(int e);
    return (e == 9) ? 0.0 : dc_mv[e] * 1.0e-3;
  endfunction
  function automatic int expected(int l);
    return int'($floor(4096.0 * (0.5 + 499.0 * (level(pos_of[l]) - level(neg_of[l])))));
  endfunction

  initial begin
    forever begin
      real t;
      t = real'($time) * 1.0e-9;
      for (int e = 0; e < 9; e++)
        elec[e] = dc_mv[e] * 1.0e-3 + (0.2e-3 + 0.05e-3 * e) * $sin(2.0 * PI * 60.0 * t + e);
      if ((t - $floor(t)) < 0.1) elec[3] = elec[3] + 0.9e-3;
      #(10us);
    end
  end

  int drops = 0;
  always @(posedge clk) if (!rst && dropped) drops++;

  int pcyc = 0;   // clock edges since reset release
  always @(posedge clk) if (!rst) pcyc <= pcyc + 1;

  initial begin
    int lit [12];
    for (int k = 0; k < 12; k++) lit[k] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #(3200ms);
    for (int l = 0; l < 12; l++) begin
      if (l == 6) continue;
      for (int p = 0; p < 3000; p++) begin
        int v;
        v = int'(u_dut.u_backend.u_mem.mem[l * 3000 + p]);
        check(v - expected(l) <= 3 && expected(l) - v <= 3, "settled lead level");
      end
    end
    check(beats == 12'd3, "three beats in three seconds");
    check(rate == 16'd60, "60 beats per minute");
    check(drops == 0, "no conversion dropped");

    // one frame, all twelve leads, column 10 of the traces
    @(negedge clk);
    while (((pcyc - 4) % FRAME) != 0) @(negedge clk);
    for (int c = 0; c < FRAME; c++) begin
      int h, v, k, y;
      h = c % 1344;
      v = c / 1344;
      if (h == XOFF + 10 && v < 768) begin
        k = v / 64;
        y = 64 * k + 63 - (expected(k) * 64) / 4096;
        if (k != 6 && g == 4'hF) begin
          lit[k]++;
          check(v >= y - 1 && v <= y + 1, "twelve-lead trace row");
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < 12; k++) if (k != 6) check(lit[k] >= 1, "trace present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (215_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
