// tb_workload_pulse: heart-rate count on EKG-like waveforms with different
// numbers of peaks.
//
// The pulse logic runs at its default sizes (3000-sample window, threshold
// 3072, 40-sample re-arm, x20).  For each peak count k, 3000 samples of a
// synthetic V1 trace are fed on the value bus, interleaved with samples of
// other leads that must be ignored.  Each beat has a sharp R wave peaking
// near 3900, a ragged top (one dip below the threshold inside the peak) and a
// T wave that stays below the threshold, on a slightly noisy baseline.  With
// the window holding only that trace, the count must be k and the rate 20k.
module tb_workload_pulse;
  import ekg_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  lead_sample_t value = '0;
  hcount_t      hcount = '0;
  vcount_t      vcount = '0;
  pixel_t       pixel;
  logic         beat;
  logic [11:0]  beats;
  logic [15:0]  rate;

  pulse_logic dut (
    .clk, .rst, .value_i(value), .hcount_i(hcount), .vcount_i(vcount),
    .pixel_o(pixel), .beat_o(beat), .beats_o(beats), .rate_o(rate)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One sample of a beat-shaped trace, ph = samples since the beat started.
  function automatic int ekg(int ph);
    if (ph < 10)      return 2100 + 180 * ph;          // R upstroke
    else if (ph == 12) return 2900;                    // dip inside the R wave
    else if (ph < 20) return 3900 - 120 * (ph - 10);   // R downstroke
    else if (ph < 200 && ph >= 120) return 2500;       // T wave, below threshold
    else              return 2048 + $urandom_range(0, 60);
  endfunction

  int peaks [8] = '{1, 2, 3, 4, 5, 6, 8, 10};
  int onsets;
  always @(negedge clk) if (!rst && beat) onsets++;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (peaks[j]) begin
      int k, per;
      k   = peaks[j];
      per = 3000 / k;
      onsets = 0;
      for (int i = 0; i < 3000; i++) begin
        int ph;
        ph = (i + per - per / 2) % per;   // first beat half a period in
        value = '{valid: 1'b1, lead: LEAD_V1, value: sample_t'(ekg(ph))};
        @(negedge clk);
        value = '{valid: 1'b1, lead: LEAD_V2, value: 12'hFFF};
        @(negedge clk);
      end
      value = '0;
      repeat (3) @(negedge clk);
      check(onsets == k, "one onset per peak");
      check(int'(beats) == k, "beats in the 3 s window");
      check(int'(rate) == 20 * k, "rate = 20 x peaks");
    end
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
