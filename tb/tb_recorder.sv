// tb_recorder: self-checking test of the lead polling recorder.
//
// A switch pulse is given every 20 cycles.  A small ADC stand-in answers each
// conversion start three cycles later with a word that encodes the two mux
// selects it saw.  The test checks, against its own table of the 12-lead
// electrode pairs, that each switch selects the next lead, that the
// conversion starts SETTLE_CYCLES+2 cycles after the switch, that every
// reading comes out tagged with the right lead, and that a conversion the
// ADC never answers is reported as dropped.
module tb_recorder;
  import ekg_pkg::*;

  localparam int SETTLE = 4;
  localparam int STEP   = 20;
  localparam int STEPS  = 30;
  localparam int MUTE   = 15;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic         switch_i = 1'b0;
  mux_sel_t     mux_sel;
  logic         convst;
  sample_t      adc_data;
  logic         adc_valid;
  lead_sample_t sample;
  logic         dropped;

  recorder #(.SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst, .switch_i, .mux_sel_o(mux_sel), .adc_convst_o(convst),
    .adc_data_i(adc_data), .adc_valid_i(adc_valid), .sample_o(sample),
    .dropped_o(dropped)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected (+, -) electrode of each lead: RA0 LA1 LL2 V1..V6 3..8 RL9.
  int exp_pos [12] = '{1, 2, 2, 0, 1, 2, 3, 4, 5, 6, 7, 8};
  int exp_neg [12] = '{0, 0, 1, 9, 9, 9, 9, 9, 9, 9, 9, 9};

  // ADC stand-in: answers three cycles after a start unless muted.
  logic       mute = 1'b0;
  int         adc_cnt = 0;
  logic [7:0] adc_sel = '0;
  always_ff @(posedge clk) begin
    adc_valid <= 1'b0;
    adc_data  <= '0;
    if (convst) begin
      adc_cnt <= 3;
      adc_sel <= mux_sel;
    end else if (adc_cnt > 0) begin
      adc_cnt <= adc_cnt - 1;
      if (adc_cnt == 1 && !mute) begin
        adc_valid <= 1'b1;
        adc_data  <= {adc_sel, 4'hA};
      end
    end
  end

  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  int switch_cycle = 0, expect_lead = 0, samples = 0, drops = 0, starts = 0;

  // Monitor on the falling edge, when the registered outputs are stable.
  always @(negedge clk) if (!rst) begin
    if (convst) begin
      starts++;
      check(cycle - switch_cycle == SETTLE + 2, "conversion start delay");
      check(mux_sel.pos == 4'(exp_pos[expect_lead]) && mux_sel.neg == 4'(exp_neg[expect_lead]),
            "mux selects at conversion");
    end
    if (sample.valid) begin
      samples++;
      check(sample.lead == lead_t'(expect_lead), "sample lead tag");
      check(sample.value == {4'(exp_neg[expect_lead]), 4'(exp_pos[expect_lead]), 4'hA},
            "sample value");
    end
    if (dropped) drops++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    for (int s = 0; s < STEPS; s++) begin
      mute = (s == MUTE);
      switch_i = 1'b1;
      switch_cycle = cycle;
      @(negedge clk);
      switch_i = 1'b0;
      expect_lead = s % 12;
      check(dropped == (s == MUTE + 1), "dropped flag on switch");
      check(mux_sel.pos == 4'(exp_pos[expect_lead]) && mux_sel.neg == 4'(exp_neg[expect_lead]),
            "mux selects after switch");
      repeat (STEP - 1) @(negedge clk);
    end
    check(starts == STEPS, "one conversion per switch");
    check(samples == STEPS - 1, "one sample per answered conversion");
    check(drops == 1, "exactly one drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
