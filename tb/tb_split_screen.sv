// tb_split_screen: self-checking test of the split screen logic.
//
// A memory model in the test answers the display read port one cycle after
// the address.  Lead L holds a level lo(L) in the first half of its history
// positions and hi(L) in the second half, so each trace is two flat segments
// joined by a vertical step whose column depends on the view position.  For
// selections of 1, 3 and 12 leads the test scans every visible pixel and
// compares it, two cycles later, with a reference drawing computed here from
// the screen layout: floor(768/n)-row strips in selection order, 1000
// columns centred in the line, column x showing history position
// view_start+3x, samples scaled to the strip, columns joined, and a line
// half-thickness of 2, 1 or 0 rows by strip height.
module tb_split_screen;
  import ekg_pkg::*;

  localparam int DEPTH = 3000;
  localparam int COLS  = DEPTH / 3;
  localparam int XOFF  = (1024 - COLS) / 2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [11:0] select = '0, view_start = '0;
  hcount_t     hcount = '0;
  vcount_t     vcount = '0;
  logic [15:0] rd_addr;
  sample_t     rd_data;
  pixel_t      pixel;

  split_screen #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .select_i(select), .view_start_i(view_start),
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

  function automatic int level(int lead, int pos);
    return (pos < DEPTH / 2) ? 100 + lead * 300 : 4000 - lead * 250;
  endfunction

  // memory model: synchronous read
  always_ff @(posedge clk) begin
    if (32'(rd_addr) < 12 * DEPTH) rd_data <= sample_t'(level(int'(rd_addr) / DEPTH, int'(rd_addr) % DEPTH));
    else                          rd_data <= '0;
  end

  // reference drawing
  int lead_of [12];
  int nsel, hgt, half;
  function automatic int row_of(int lead, int top, int x);
    int pos;
    pos = (int'(view_start) + 3 * x) % DEPTH;
    return top + hgt - 1 - (level(lead, pos) * hgt) / 4096;
  endfunction
  function automatic logic expect_lit(int h, int v);
    int k, x, y, yp, lo, hi;
    if (nsel == 0) return 1'b0;
    if (h < XOFF || h >= XOFF + COLS) return 1'b0;
    if (v >= nsel * hgt) return 1'b0;
    k  = v / hgt;
    x  = h - XOFF;
    y  = row_of(lead_of[k], k * hgt, x);
    yp = (x == 0) ? y : row_of(lead_of[k], k * hgt, x - 1);
    lo = ((y < yp) ? y : yp) - half;
    hi = ((y < yp) ? yp : y) + half;
    return (v >= lo) && (v <= hi);
  endfunction

  logic exp_pipe [1];
  int lit_count;

  task automatic run_frame(input logic [11:0] sel, input int vs);
    select = sel;
    view_start = 12'(vs);
    nsel = 0;
    for (int i = 0; i < 12; i++) if (sel[i]) begin lead_of[nsel] = i; nsel++; end
    hgt  = (nsel == 0) ? 0 : 768 / nsel;
    half = (hgt >= 192) ? 2 : (hgt >= 96) ? 1 : 0;
    lit_count = 0;
    exp_pipe[0] = 1'b0;
    for (int v = 0; v < 768; v++) begin
      for (int h = 0; h < 1024 + 1; h++) begin
        hcount = hcount_t'(h);
        vcount = vcount_t'(v);
        @(negedge clk);
        // The pixel register now holds the answer to the previous hcount:
        // two clock edges have passed since that one was presented.
        if (h >= 1) begin
          check(pixel == (exp_pipe[0] ? TRACE_COLOUR : 32'h0), "pixel");
          if (exp_pipe[0]) lit_count++;
        end
        exp_pipe[0] = expect_lit(h, v);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_frame(12'b0000_0000_0001, 0);       // lead I alone
    check(lit_count > 1000 * 5, "single-lead trace drawn");
    run_frame(12'b0100_0100_0100, 1234);    // three leads, shifted view
    check(lit_count > 3000 * 3, "three traces drawn");
    run_frame(12'hFFF, 2999);               // all twelve
    check(lit_count > 12000, "twelve traces drawn");
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
