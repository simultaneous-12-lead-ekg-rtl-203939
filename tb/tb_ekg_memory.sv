// tb_ekg_memory: self-checking test of the circular lead history.
//
// With a 5-sample history, rounds of twelve writes (leads 0..11, value
// derived from round and lead) are stored.  The test checks that the value
// bus repeats each write one cycle later, that the write position advances
// once per round and wraps after 5 rounds, and, after 8 rounds, reads every
// word back through the display port, checking the one-cycle read latency
// and that each position holds the newest round written there.
module tb_ekg_memory;
  import ekg_pkg::*;

  localparam int DEPTH  = 5;
  localparam int ROUNDS = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  lead_sample_t wr = '0, value;
  logic [15:0]  rd_addr = '0;
  sample_t      rd_data;
  logic [11:0]  oldest;

  ekg_memory #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .wr_i(wr), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .value_o(value), .oldest_o(oldest)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t val(int round, int lead);
    return sample_t'(round * 97 + lead * 13 + 1);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(oldest == 12'd0, "position after reset");
    for (int r = 0; r < ROUNDS; r++) begin
      for (int l = 0; l < NUM_LEADS; l++) begin
        wr = '{valid: 1'b1, lead: lead_t'(l), value: val(r, l)};
        @(negedge clk);
        check(value.valid && value.lead == lead_t'(l) && value.value == val(r, l),
              "value bus echo");
        // a gap cycle now and then
        wr = '0;
        if (l == 4) begin
          @(negedge clk);
          check(!value.valid, "value bus idle");
        end
      end
      wr = '0;
      @(negedge clk);
      check(oldest == 12'((r + 1) % DEPTH), "position after round");
    end
    // read back every word
    for (int l = 0; l < NUM_LEADS; l++) begin
      for (int p = 0; p < DEPTH; p++) begin
        int newest;
        rd_addr = 16'(l * DEPTH + p);
        @(negedge clk);
        // newest round that wrote position p: r with r % DEPTH == p, r < ROUNDS
        newest = p;
        while (newest + DEPTH < ROUNDS) newest += DEPTH;
        check(rd_data == val(newest, l), "stored value");
        rd_addr = 16'(((l + 1) % NUM_LEADS) * DEPTH);
        check(rd_data == val(newest, l), "read data held until next edge");
      end
    end
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
