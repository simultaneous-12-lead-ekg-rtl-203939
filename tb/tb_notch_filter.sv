// tb_notch_filter: checks the notch filter model's response.
//
// Sines of 60 Hz, 5 Hz and 200 Hz and a DC level are applied in turn for
// 600 ms each (the input updated every 10 us).  After 300 ms of settling the
// peak output over the next 300 ms is compared with the magnitude of the
// twin-T response worked out here from its continuous-time formula,
// |w0^2 - w^2| / sqrt((w0^2 - w^2)^2 + (4*w0*w)^2), within 2% of the input
// amplitude: about 0 at 60 Hz, 0.948 at 5 Hz, 0.604 at 200 Hz and 1 at DC.
module tb_notch_filter;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0;
  always #5000 clk = ~clk;   // 10 us watchdog clock

  real vin = 0.0, vout;
  notch_filter dut (.vin, .vout);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real mag(real f);
    real w0, w, d;
    w0 = 2.0 * PI * 60.0;
    w  = 2.0 * PI * f;
    d  = w0 * w0 - w * w;
    return ((d < 0.0) ? -d : d) / $sqrt(d * d + 16.0 * w0 * w0 * w * w);
  endfunction

  task automatic run(input real f, input real amp);
    real peak, t, o;
    peak = 0.0;
    for (int i = 0; i < 60000; i++) begin
      t = real'(i) * 10.0e-6;
      vin = (f == 0.0) ? amp : amp * $sin(2.0 * PI * f * t);
      #(10us);
      if (i >= 30000) begin
        o = (vout < 0.0) ? -vout : vout;
        if (o > peak) peak = o;
      end
    end
    $display("f=%0.1f Hz: peak %f, expected %f", f, peak / amp, mag(f));
    check((peak / amp - mag(f)) < 0.02 && (mag(f) - peak / amp) < 0.02, "response magnitude");
  endtask

  initial begin
    #(3us);
    run(60.0, 1.0e-3);
    run(5.0, 1.0e-3);
    run(200.0, 1.0e-3);
    run(0.0, 1.0e-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
