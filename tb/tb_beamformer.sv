// Feeds cells of 72 random quadrature samples in the A/D card's order and
// compares the 61 beams with a floating-point evaluation of the weighted,
// zero-padded 128-point spatial DFT (lines -30..+30, middle channel of each
// group and every second cell negated), within the fixed-point rounding bound. Also checks one
// beam per 36 clocks, 61 beams per cell, the drop and `overrun` flag when
// cells arrive faster than they can be transformed, and `clear`.
module tb_beamformer;
  import acp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, clear = 0;
  logic fifo_empty, fifo_rd;
  logic [15:0] fifo_data;
  logic out_valid, busy, overrun;
  beam_sample_t out;
  int checks = 0, failures = 0;

  beamformer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model, first word fall through; a word read at a rising edge is
  // removed at the following falling edge, so the read never races the pop
  logic [15:0] q [$];
  logic pop_q = 1'b0;
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 16'd0 : q[0];
  always @(posedge clk) pop_q <= fifo_rd;
  always @(negedge clk) if (pop_q) void'(q.pop_front());

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  real exp_re [61], exp_im [61];
  beam_sample_t got [$];
  int  got_t [$];
  int  cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin got.push_back(out); got_t.push_back(cyc); end
  end

  int cell_idx = 0;   // cells since reset or clear; odd cells arrive negated

  task automatic make_cell(input int kind);
    real xi [36], xq [36];
    logic signed [15:0] s;
    for (int idx = 0; idx < 72; idx++) begin
      int conv, g, ch;
      conv = idx / 12; g = idx % 12; ch = 3 * g + conv / 2;
      if (kind == 0) s = 16'($signed(14'($urandom)));
      // a plane wave: I = cos(phi_k), Q = cos(phi_k + 90 deg) = -sin(phi_k),
      // i.e. I + jQ = exp(-j phi_k) with phi_k = 2 pi k 7 / 128; the middle
      // channel of a group is sampled half a carrier period later and so
      // arrives negated
      else s = 16'($rtoi(((ch % 3 == 1) ? -6000.0 : 6000.0) *
                         $cos(2.0 * PI * ch * 7 / 128.0 + (conv % 2) * PI / 2)));
      if (kind == 1 && cell_idx % 2 == 1) s = -s;
      q.push_back(s);
      if (conv % 2 == 0) xi[ch] = ((ch % 3 == 1) != (cell_idx % 2 == 1)) ? -real'(s) : real'(s);
      else               xq[ch] = ((ch % 3 == 1) != (cell_idx % 2 == 1)) ? -real'(s) : real'(s);
    end
    cell_idx++;
    for (int b = 0; b < 61; b++) begin
      real th, w;
      exp_re[b] = 0.0; exp_im[b] = 0.0;
      for (int k = 0; k < 36; k++) begin
        w  = 0.45 + 0.55 * $cos(PI * (k - 17.5) / 36.0);
        th = 2.0 * PI * k * (b - 30) / 128.0;
        exp_re[b] += w * (xi[k] * $cos(th) + xq[k] * $sin(th));
        exp_im[b] += w * (xq[k] * $cos(th) - xi[k] * $sin(th));
      end
    end
  endtask

  task automatic check_cell(input string tag);
    check(got.size() == 61, $sformatf("%s: %0d beams", tag, got.size()));
    for (int b = 0; b < got.size() && b < 61; b++) begin
      real tol;
      tol = 60.0 + 1e-3 * (fabs(exp_re[b]) + fabs(exp_im[b]));
      check(got[b].beam == 6'(b), "beam order");
      check(fabs(real'(got[b].re) - exp_re[b]) < tol && fabs(real'(got[b].im) - exp_im[b]) < tol,
            $sformatf("%s beam %0d got (%0d,%0d) exp (%0.1f,%0.1f)", tag, b, got[b].re, got[b].im, exp_re[b], exp_im[b]));
      if (b > 0) check(got_t[b] - got_t[b-1] == 36, "one beam per 36 clocks");
    end
    got.delete(); got_t.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6; c++) begin
      make_cell(c == 2 ? 1 : 0);
      wait (got.size() == 61);
      repeat (5) @(posedge clk);
      check_cell($sformatf("cell %0d", c));
      check(!overrun, "no overrun at normal rate");
    end
    // exp(-j 2 pi k 7 / 128) is line -7 of the DFT: beam 30 - 7 = 23
    make_cell(1);
    wait (got.size() == 61);
    repeat (5) @(posedge clk);
    begin
      automatic int best = 0;
      automatic real bm = 0.0;
      for (int b = 0; b < 61; b++) begin
        real m;
        m = real'(got[b].re) * real'(got[b].re) + real'(got[b].im) * real'(got[b].im);
        if (m > bm) begin bm = m; best = b; end
      end
      check(best == 23, $sformatf("plane wave peak at beam %0d", best));
    end
    check_cell("plane wave");
    // three cells at once: the second completes while the first is being
    // transformed and is dropped
    make_cell(0); make_cell(0); make_cell(0);
    repeat (3000) @(posedge clk);
    check(overrun, "overrun flagged");
    check(got.size() == 61 || got.size() == 122, $sformatf("beams after burst %0d", got.size()));
    got.delete(); got_t.delete();
    wait (!busy);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(!overrun, "clear resets overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
