// tb_analog_mux: checks the analog multiplexer model.  Random voltages are
// put on the ten inputs and every select value 0..15 is tried; the output
// must equal the selected input, and 0 V for selects beyond the inputs.
module tb_analog_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  real        vin [10];
  logic [3:0] sel = '0;
  real        vout;
  analog_mux dut (.vin, .sel, .vout);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 10; i++) vin[i] = real'($urandom_range(0, 2000)) * 1.0e-6 - 1.0e-3;
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        @(negedge clk);
        check(vout == ((s < 10) ? vin[s] : 0.0), "selected input");
      end
    end
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
