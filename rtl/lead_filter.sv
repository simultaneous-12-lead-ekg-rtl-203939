// lead_filter: per-lead low-pass filter and decimator.
//
// The recorder polls each lead at tens of kS/s, far faster than the display
// needs, and the polling adds high-frequency noise.  This block averages
// 2**DECIM_LOG2 consecutive readings of each lead (a boxcar low-pass filter)
// and emits one averaged sample per lead for every 2**DECIM_LOG2 readings of
// it.  With the default 85-cycle switch period at 65 MHz each lead is read at
// about 64 kS/s and stored at about 1 kS/s, the rate at which 3000 samples
// span the 3 seconds shown on screen.
//
// Interface: in_i and out_o are lead-tagged samples, valid for one cycle.
// out_o is registered and follows the last reading of a block by one cycle.
// Each lead has its own accumulator and reading counter, so a dropped reading
// delays that lead's output without affecting the others.
//
// The design description asks for digital filtering against high-frequency
// noise and for about 1 kS/s per lead in memory; the boxcar average and the
// power-of-two decimation ratio are this design's choices.
module lead_filter
  import ekg_pkg::*;
#(
  parameter int unsigned DECIM_LOG2 = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  lead_sample_t in_i,
  output lead_sample_t out_o
);

  localparam int unsigned ACC_W = SAMPLE_W + DECIM_LOG2;
  localparam int unsigned CNT_W = (DECIM_LOG2 > 0) ? DECIM_LOG2 : 1;

  logic [ACC_W-1:0] acc_q [NUM_LEADS];
  logic [CNT_W-1:0] cnt_q [NUM_LEADS];

  logic [ACC_W-1:0] sum;
  logic             last;
  always_comb begin
    sum  = acc_q[in_i.lead] + ACC_W'(in_i.value);
    last = (DECIM_LOG2 == 0) || (cnt_q[in_i.lead] == {CNT_W{1'b1}});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_LEADS; i++) begin
        acc_q[i] <= '0;
        cnt_q[i] <= '0;
      end
      out_o <= '0;
    end else begin
      out_o <= '0;
      if (in_i.valid && (in_i.lead < lead_t'(NUM_LEADS))) begin
        cnt_q[in_i.lead] <= cnt_q[in_i.lead] + 1'b1;
        if (last) begin
          acc_q[in_i.lead] <= '0;
          out_o <= '{valid: 1'b1, lead: in_i.lead,
                     value: sample_t'(sum >> DECIM_LOG2)};
        end else begin
          acc_q[in_i.lead] <= sum;
        end
      end
    end
  end

endmodule
