// adc_model: behavioural model of the analog front end and the board ADC,
// for simulation only.
//
// It stands for the two analog muxes, the instrumentation amplifier and the
// 12-bit ADC together.  The test supplies the (already filtered and
// amplified) level of each of the ten electrodes in ADC counts.  On a
// conversion start the model samples the difference of the two electrodes
// picked by mux_sel ([3:0] on the + input, [7:4] on the - input), adds the
// mid-scale offset 2048, clips to 0..4095, and presents the result with a
// one-cycle valid CONV_CYCLES cycles later (extra_delay cycles later still,
// to let a test make a conversion late).
module adc_model #(
  parameter int CONV_CYCLES = 26
) (
  input  logic        clk,
  input  logic [7:0]  mux_sel,
  input  logic        convst,
  input  int          elec [10],
  input  int          extra_delay,
  output logic [11:0] data,
  output logic        valid
);
  int count;
  int held;

  initial begin
    count = 0;
    held  = 0;
    data  = '0;
    valid = 1'b0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    if (convst) begin
      int d;
      d = 2048 + elec[mux_sel[3:0]] - elec[mux_sel[7:4]];
      held  <= (d < 0) ? 0 : (d > 4095) ? 4095 : d;
      count <= CONV_CYCLES + extra_delay;
    end else if (count > 0) begin
      count <= count - 1;
      if (count == 1) begin
        valid <= 1'b1;
        data  <= 12'(held);
      end
    end
  end
endmodule
