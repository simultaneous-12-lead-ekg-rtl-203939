// tb_lead_filter: self-checking test of the per-lead averaging decimator.
//
// Random readings are fed round-robin over the twelve leads, with some beats
// left idle and some readings skipped, to a filter that averages 8 readings.
// A reference model keeps its own sum and count per lead; every output must
// appear one cycle after the 8th reading of its lead and equal the floor of
// the mean of those 8 readings.
module tb_lead_filter;
  import ekg_pkg::*;

  localparam int LOG2 = 3;
  localparam int N    = 1 << LOG2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  lead_sample_t in_s = '0, out_s;
  lead_filter #(.DECIM_LOG2(LOG2)) dut (.clk, .rst, .in_i(in_s), .out_o(out_s));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int sum [12];
  int cnt [12];
  int outputs = 0;
  logic exp_valid = 1'b0;
  int   exp_lead = 0, exp_val = 0;

  initial begin
    for (int i = 0; i < 12; i++) begin sum[i] = 0; cnt[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int step = 0; step < 12 * N * 6; step++) begin
      int lead;
      lead = step % 12;
      // check the previous cycle's expectation
      check(out_s.valid == exp_valid, "output valid timing");
      if (exp_valid) begin
        outputs++;
        check(out_s.lead == lead_t'(exp_lead), "output lead");
        check(int'(out_s.value) == exp_val, "output mean");
      end
      exp_valid = 1'b0;
      in_s = '0;
      if ($urandom_range(0, 9) != 0 && !(lead == 5 && step % 7 == 0)) begin
        in_s.valid = 1'b1;
        in_s.lead  = lead_t'(lead);
        in_s.value = sample_t'($urandom_range(0, 4095));
        sum[lead] += int'(in_s.value);
        cnt[lead]++;
        if (cnt[lead] == N) begin
          exp_valid = 1'b1;
          exp_lead  = lead;
          exp_val   = sum[lead] / N;
          sum[lead] = 0;
          cnt[lead] = 0;
        end
      end
      @(negedge clk);
    end
    check(out_s.valid == exp_valid, "last output valid");
    if (exp_valid) outputs++;
    check(outputs >= 12 * 4, "enough outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
