// tb_instrumentation_amp: checks the instrumentation amplifier model.
// Random input pairs of up to +-1.2 mV are applied; the output must be
// 0.5 V + 499 x (vp - vn), the gain of R1 = 24.9 k, RGAIN = 100 and
// R3/R2 = 1 worked out by hand, clipped to 0..1 V.  A common-mode shift of
// both inputs must not move the output.
module tb_instrumentation_amp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  real vp = 0.0, vn = 0.0, vout;
  instrumentation_amp dut (.vp, .vn, .vout);

  int checks = 0, failures = 0, clipped = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      real e, cm, o;
      vp = real'($urandom_range(0, 2400)) * 1.0e-6 - 1.2e-3;
      vn = real'($urandom_range(0, 2400)) * 1.0e-6 - 1.2e-3;
      @(negedge clk);
      e = 0.5 + 499.0 * (vp - vn);
      if (e < 0.0 || e > 1.0) clipped++;
      e = (e < 0.0) ? 0.0 : (e > 1.0) ? 1.0 : e;
      check(near(vout, e), "gain and clipping");
      o  = vout;
      cm = real'($urandom_range(0, 1000)) * 1.0e-3;
      vp = vp + cm;
      vn = vn + cm;
      @(negedge clk);
      check((vout - o < 1.0e-6) && (o - vout < 1.0e-6), "common mode rejected");
    end
    check(clipped > 0, "clipping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
