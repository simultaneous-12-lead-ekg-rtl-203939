// xadc_model: behavioural model of the board's 12-bit ADC on a real-valued
// input, for simulation only.
//
// The input range is 0..1 V, unipolar.  On a conversion start the model
// samples `vin`, converts it to floor(vin * 4096) clipped to 0..4095, and
// presents the code with a one-cycle `valid` CONV_CYCLES clock cycles later
// (extra_delay cycles later still, to let a test make a conversion late).
module xadc_model #(
  parameter int CONV_CYCLES = 26
) (
  input  logic        clk,
  input  logic        convst,
  input  real         vin,
  input  int          extra_delay,   // added to one conversion's time
  output logic [11:0] data,
  output logic        valid
);
  int   count;
  logic [11:0] held;

  initial begin
    count = 0;
    held  = '0;
    data  = '0;
    valid = 1'b0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    if (convst) begin
      real c;
      c = vin * 4096.0;
      held  <= (c < 0.0) ? 12'd0 : (c >= 4095.0) ? 12'd4095 : 12'($floor(c));
      count <= CONV_CYCLES + extra_delay;
    end else if (count > 0) begin
      count <= count - 1;
      if (count == 1) begin
        valid <= 1'b1;
        data  <= held;
      end
    end
  end
endmodule
