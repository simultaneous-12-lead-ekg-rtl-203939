// tb_pulse_logic: self-checking test of the heart-rate logic.
//
// A stream of lead samples is fed on the value bus: V1 carries beats of
// random width and spacing (and short dips inside a beat), the other leads
// carry large values that must be ignored.  A reference detector in the
// test (threshold, re-arm after LOW_RUN lows, onsets counted over the last
// DEPTH V1 samples) gives the expected beat count after every V1 sample, and
// the rate must be that count times 20.  The test then scans the digit area
// in the top right corner for a known rate and checks chosen segment pixels,
// two cycles after their hcount/vcount.
module tb_pulse_logic;
  import ekg_pkg::*;

  localparam int DEPTH  = 50;
  localparam int THR    = 3072;
  localparam int RUN    = 3;
  localparam int X0     = 1024 - 16 - 3 * 24 - 2 * 8;   // 920
  localparam int Y0     = 16;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  lead_sample_t value = '0;
  hcount_t      hcount = '0;
  vcount_t      vcount = '0;
  pixel_t       pixel;
  logic         beat;
  logic [11:0]  beats;
  logic [15:0]  rate;

  pulse_logic #(.DEPTH(DEPTH), .THRESHOLD(THR), .LOW_RUN(RUN), .RATE_MULT(20)) dut (
    .clk, .rst, .value_i(value), .hcount_i(hcount), .vcount_i(vcount),
    .pixel_o(pixel), .beat_o(beat), .beats_o(beats), .rate_o(rate)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference detector
  logic ref_onset [$];
  logic ref_armed = 1'b1;
  int   ref_low = 0, ref_beats = 0, total_onsets = 0;

  task automatic feed(input int lead, input int v);
    value = '{valid: 1'b1, lead: lead_t'(lead), value: sample_t'(v)};
    @(negedge clk);
    value = '0;
    if (lead == 6) begin
      logic onset;
      onset = ref_armed && (v >= THR);
      if (onset) begin ref_armed = 1'b0; ref_low = 0; total_onsets++; end
      else if (!ref_armed) begin
        if (v >= THR) ref_low = 0;
        else begin ref_low++; if (ref_low >= RUN) begin ref_armed = 1'b1; ref_low = 0; end end
      end
      check(beat == onset, "beat pulse");
      ref_onset.push_back(onset);
      if (ref_onset.size() > DEPTH) void'(ref_onset.pop_front());
      ref_beats = 0;
      foreach (ref_onset[i]) ref_beats += int'(ref_onset[i]);
      @(negedge clk);
      check(int'(beats) == ref_beats, "beats in window");
      @(negedge clk);
      check(int'(rate) == 20 * ref_beats, "rate = 20 x beats");
    end
  endtask

  task automatic pixel_at(input int h, input int v, input logic lit);
    hcount = hcount_t'(h);
    vcount = vcount_t'(v);
    @(negedge clk);
    @(negedge clk);
    check(pixel == (lit ? RATE_COLOUR : 32'h0), "digit pixel");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < 40; b++) begin
      int width, gap;
      width = $urandom_range(1, 6);
      gap   = $urandom_range(1, 8);
      for (int i = 0; i < width; i++) begin
        feed(6, (i == 2) ? 1000 : $urandom_range(THR, 4095));   // dip inside a beat
        feed($urandom_range(0, 5), 4095);                        // other leads ignored
      end
      for (int i = 0; i < gap; i++) begin
        feed(6, $urandom_range(0, THR - 1));
        feed(7 + $urandom_range(0, 4), 4000);
      end
    end
    check(total_onsets > 10, "enough beats seen");

    // Set a known rate: 3 onsets in the window -> 60 bpm ("60").
    for (int i = 0; i < DEPTH; i++) feed(6, 0);
    for (int b = 0; b < 3; b++) begin
      feed(6, 4000);
      for (int i = 0; i < RUN; i++) feed(6, 0);
    end
    repeat (3) @(negedge clk);
    check(rate == 16'd60, "rate 60");
    // hundreds digit blank
    pixel_at(X0 + 10, Y0 + 1, 1'b0);
    // tens digit 6: a on, b off, g on, e on
    pixel_at(X0 + 32 + 10, Y0 + 1, 1'b1);
    pixel_at(X0 + 32 + 22, Y0 + 10, 1'b0);
    pixel_at(X0 + 32 + 10, Y0 + 20, 1'b1);
    pixel_at(X0 + 32 + 1, Y0 + 30, 1'b1);
    // units digit 0: a on, g off, c on, d on
    pixel_at(X0 + 64 + 10, Y0 + 1, 1'b1);
    pixel_at(X0 + 64 + 10, Y0 + 20, 1'b0);
    pixel_at(X0 + 64 + 22, Y0 + 30, 1'b1);
    pixel_at(X0 + 64 + 10, Y0 + 38, 1'b1);
    // outside the digit area
    pixel_at(X0 - 1, Y0 + 1, 1'b0);
    pixel_at(500, 400, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
