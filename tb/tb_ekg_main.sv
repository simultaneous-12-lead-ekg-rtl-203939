// tb_ekg_main: self-checking test of the system controller.
//
// Random switch settings and pixel words are applied every cycle.  The test
// checks that the lead selection and the OR of the two pixels appear one
// cycle later, that the recorder strobe comes exactly every SWITCH_CYCLES
// cycles, and that the view position follows the memory position only on a
// frame start.
module tb_ekg_main;
  import ekg_pkg::*;

  localparam int PERIOD = 7;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] sw = '0, select, view_start, oldest = '0;
  pixel_t      pa = '0, pb = '0, pix;
  logic        frame_start = 1'b0, rec_switch;

  ekg_main #(.SWITCH_CYCLES(PERIOD)) dut (
    .clk, .rst, .sw_i(sw), .pix_split_i(pa), .pix_pulse_i(pb),
    .mem_oldest_i(oldest), .frame_start_i(frame_start), .select_o(select),
    .view_start_o(view_start), .pixel_o(pix), .rec_switch_o(rec_switch)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [11:0] sw_prev, view_exp;
  pixel_t      or_prev;
  int          last_strobe = -1, strobes = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    view_exp = '0;
    for (int c = 0; c < 400; c++) begin
      sw          = 12'($urandom);
      pa          = $urandom;
      pb          = $urandom;
      oldest      = 12'($urandom_range(0, 2999));
      frame_start = ($urandom_range(0, 19) == 0);
      sw_prev = sw;
      or_prev = pa | pb;
      if (frame_start) view_exp = oldest;
      @(negedge clk);
      check(select == sw_prev, "selection registered");
      check(pix == or_prev, "pixel OR registered");
      check(view_start == view_exp, "view position");
      if (rec_switch) begin
        if (last_strobe >= 0) check(c - last_strobe == PERIOD, "switch period");
        last_strobe = c;
        strobes++;
      end
    end
    check(strobes == 400 / PERIOD || strobes == 400 / PERIOD + 1, "number of strobes");
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
