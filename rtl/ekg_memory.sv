// ekg_memory: three-second circular history of every lead (the EKG Memory).
//
// The memory is one array of NUM_LEADS*DEPTH samples; lead L owns the words
// L*DEPTH .. L*DEPTH+DEPTH-1.  All leads share one write position: the
// filter delivers the leads in order 0..11, each write goes to
// L*DEPTH + wr_pos, and the position advances (wrapping at DEPTH) after the
// last lead has been written.  `oldest_o` is therefore the position of the
// oldest sample of every lead, and the newest sample sits just before it.
//
// Every stored value is also sent on, registered, as `value_o` (the value bus
// to the split screen and pulse logic).  The display read port is
// synchronous: rd_data_o holds the word at rd_addr_i one cycle after the
// address is presented, as a block RAM would.  The contents are not cleared
// at reset; until DEPTH samples of a lead have been written, its history
// holds whatever the RAM powered up with.
//
// From the design description: storing each lead in memory so that its
// history is always available, the value bus to the two readers, and 3 s of
// history at 1 kS/s (3000 samples).  The single array, the shared write
// position and the synchronous read port are this design's choices.
module ekg_memory
  import ekg_pkg::*;
#(
  parameter int unsigned DEPTH = HIST_DEPTH
) (
  input  logic         clk,
  input  logic         rst,
  input  lead_sample_t wr_i,       // filtered sample to store
  input  logic [15:0]  rd_addr_i,  // lead*DEPTH + position
  output sample_t      rd_data_o,
  output lead_sample_t value_o,    // copy of every stored sample
  output logic [11:0]  oldest_o    // shared write position = oldest sample
);

  localparam int unsigned WORDS = NUM_LEADS * DEPTH;

  sample_t     mem [WORDS];
  logic [11:0] wr_pos_q;

  logic [15:0] wr_addr;
  assign wr_addr = 16'(wr_i.lead) * 16'(DEPTH) + 16'(wr_pos_q);

  always_ff @(posedge clk) begin
    if (wr_i.valid && (wr_i.lead < lead_t'(NUM_LEADS))) begin
      mem[wr_addr] <= wr_i.value;
    end
    rd_data_o <= (32'(rd_addr_i) < WORDS) ? mem[rd_addr_i] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_pos_q <= '0;
      value_o  <= '0;
    end else begin
      value_o <= wr_i;
      if (wr_i.valid && (wr_i.lead == lead_t'(NUM_LEADS - 1))) begin
        wr_pos_q <= (wr_pos_q == 12'(DEPTH - 1)) ? 12'd0 : wr_pos_q + 12'd1;
      end
    end
  end

  assign oldest_o = wr_pos_q;

endmodule
