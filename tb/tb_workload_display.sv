// tb_workload_display: twelve different 3000-sample waveforms shown at once.
//
// The EKG memory (3000 samples per lead) is filled through its write port
// with twelve generated waveforms: sines, triangles, squares and EKG-like
// spike trains, each lead with its own number of cycles per 3 seconds.  The
// split screen logic then draws from the memory's read port, as in the full
// design.  Three frames are scanned, with all twelve leads, with six leads
// and with lead I alone, and every visible pixel is compared with a
// reference drawing computed here from the generated samples (strips of
// floor(768/n) rows, 1000 centred columns of every third sample, samples
// scaled to the strip, columns joined, line half-thickness 2/1/0).
module tb_workload_display;
  import ekg_pkg::*;

  localparam int DEPTH = 3000;
  localparam int COLS  = DEPTH / 3;
  localparam int XOFF  = (1024 - COLS) / 2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  lead_sample_t wr = '0, value;
  logic [15:0]  rd_addr;
  sample_t      rd_data;
  logic [11:0]  oldest;
  logic [11:0]  select = '0;
  hcount_t      hcount = '0;
  vcount_t      vcount = '0;
  pixel_t       pixel;

  ekg_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst, .wr_i(wr), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .value_o(value), .oldest_o(oldest)
  );
  split_screen #(.DEPTH(DEPTH)) u_split (
    .clk, .rst, .select_i(select), .view_start_i(oldest),
    .hcount_i(hcount), .vcount_i(vcount), .rd_addr_o(rd_addr),
    .rd_data_i(rd_data), .pixel_o(pixel)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (h=%0d v=%0d)", what, $time, hcount, vcount);
    end
  endtask

  // Waveform of lead l at sample i (0..2999): l+1 cycles per 3000 samples.
  function automatic int wave(int l, int i);
    int  per, ph;
    real t;
    per = DEPTH / (l + 1);
    ph  = i % per;
    t   = real'(ph) / real'(per);
    case (l % 4)
      0: return 2048 + int'(1500.0 * $sin(6.283185307 * t));
      1: return (t < 0.5) ? 548 + int'(6000.0 * t) : 3548 - int'(6000.0 * (t - 0.5));
      2: return (t < 0.3) ? 3500 : 600;
      default: return (ph < 8) ? 2000 + 220 * ph : (ph < 16) ? 3760 - 220 * (ph - 8) : 2000;
    endcase
  endfunction

  int samp [12][DEPTH];
  int lead_of [12];
  int nsel, hgt, half;

  function automatic int row_of(int lead, int top, int x);
    return top + hgt - 1 - (samp[lead][(int'(oldest) + 3 * x) % DEPTH] * hgt) / 4096;
  endfunction
  function automatic logic expect_lit(int h, int v);
    int k, x, y, yp, lo, hi;
    if (nsel == 0 || h < XOFF || h >= XOFF + COLS || v >= nsel * hgt) return 1'b0;
    k  = v / hgt;
    x  = h - XOFF;
    y  = row_of(lead_of[k], k * hgt, x);
    yp = (x == 0) ? y : row_of(lead_of[k], k * hgt, x - 1);
    lo = ((y < yp) ? y : yp) - half;
    hi = ((y < yp) ? yp : y) + half;
    return (v >= lo) && (v <= hi);
  endfunction

  int lit_count;
  task automatic run_frame(input logic [11:0] sel);
    logic exp_prev;
    select = sel;
    nsel = 0;
    for (int i = 0; i < 12; i++) if (sel[i]) begin lead_of[nsel] = i; nsel++; end
    hgt  = 768 / nsel;
    half = (hgt >= 192) ? 2 : (hgt >= 96) ? 1 : 0;
    lit_count = 0;
    exp_prev = 1'b0;
    for (int v = 0; v < 768; v++) begin
      for (int h = 0; h < 1024 + 1; h++) begin
        hcount = hcount_t'(h);
        vcount = vcount_t'(v);
        @(negedge clk);
        if (h >= 1) begin
          check(pixel == (exp_prev ? TRACE_COLOUR : 32'h0), "pixel");
          if (exp_prev) lit_count++;
        end
        exp_prev = expect_lit(h, v);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < 12; l++)
      for (int i = 0; i < DEPTH; i++) samp[l][i] = wave(l, i);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // record 3000 rounds of all twelve leads, then 700 more of the same
    // waveforms so that the history has wrapped and the view starts mid-way
    for (int i = 0; i < DEPTH + 700; i++) begin
      for (int l = 0; l < 12; l++) begin
        wr = '{valid: 1'b1, lead: lead_t'(l), value: sample_t'(samp[l][i % DEPTH])};
        @(negedge clk);
      end
    end
    wr = '0;
    @(negedge clk);
    check(oldest == 12'd700, "history position after wrap");
    run_frame(12'hFFF);
    check(lit_count > 12 * COLS, "twelve traces drawn");
    run_frame(12'b1010_1010_1010);
    check(lit_count > 6 * COLS * 3, "six traces drawn");
    run_frame(12'h001);
    check(lit_count > COLS * 5, "one trace drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
