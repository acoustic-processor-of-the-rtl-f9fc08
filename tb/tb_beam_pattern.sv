// Beam-pattern workload for the beamformer at its default size (36
// channels, 128-point padding, 61 beams).
//
// Plane waves are fed as cells in the A/D card's sample order, with the
// sign pattern of the sampling scheme (middle channel of a group and every
// second cell arrive negated). The wave's phase step per element is
// 2 pi m0 / 128, swept from m0 = -64 to +64 in quarter-line steps, so the
// response of the broadside beam (beam 30) traces its pattern against
// spatial frequency. Checks, all worked out here in floating point:
//   - the broadside pattern follows the weighted array factor
//     |sum w_k exp(j 2 pi k m0 / 128)| (cosine on a 0.45 pedestal) to
//     within 0.2 % of the peak at every point;
//   - its highest side lobe lies between -20 and -17 dB, near the -18 dB the
//     weighting is meant to give;
//   - adjacent beams cross above -1.5 dB (no gaps in the 61-beam fan);
//   - for every integer m0 from -30 to +30 the strongest beam is 30 - m0,
//     so each of the 61 beams answers its own direction.
module tb_beam_pattern;
  import acp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real A  = 6000.0;
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
    #40000000;
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

  real got [61];
  int  n_got = 0;
  always @(posedge clk)
    if (out_valid) begin
      got[out.beam] = $sqrt(real'(out.re) * real'(out.re) + real'(out.im) * real'(out.im));
      n_got++;
    end

  function automatic real db(input real x, input real ref_v);
    return 20.0 * $log10((x < 1e-9 ? 1e-9 : x) / ref_v);
  endfunction

  // weighted array factor of the broadside beam
  function automatic real af(input real m0);
    real re, im, w;
    re = 0.0; im = 0.0;
    for (int k = 0; k < 36; k++) begin
      w  = 0.45 + 0.55 * $cos(PI * (k - 17.5) / 36.0);
      re += w * $cos(2.0 * PI * k * m0 / 128.0);
      im += w * $sin(2.0 * PI * k * m0 / 128.0);
    end
    return $sqrt(re * re + im * im);
  endfunction

  int cell_idx = 0;
  task automatic send_wave(input real m0);
    logic signed [15:0] s;
    for (int idx = 0; idx < 72; idx++) begin
      int conv, g, ch;
      conv = idx / 12; g = idx % 12; ch = 3 * g + conv / 2;
      s = 16'($rtoi(((ch % 3 == 1) ? -A : A) *
                    $cos(2.0 * PI * ch * m0 / 128.0 + (conv % 2) * PI / 2)));
      if (cell_idx % 2 == 1) s = -s;
      q.push_back(s);
    end
    cell_idx++;
    n_got = 0;
    wait (n_got == 61);
    repeat (3) @(posedge clk);
  endtask

  real pat [513];
  initial begin
    real peak, ref_af, worst, sll, xover;
    int  first_null;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // broadside pattern
    for (int i = 0; i <= 512; i++) begin
      send_wave(-64.0 + 0.25 * i);
      pat[i] = got[30];
    end
    peak = pat[256]; ref_af = af(0.0);
    worst = 0.0;
    for (int i = 0; i <= 512; i++) begin
      real d;
      d = pat[i] / peak - af(-64.0 + 0.25 * i) / ref_af;
      if (d > worst || -d > worst) worst = (d < 0.0) ? -d : d;
    end
    check(worst < 0.002, $sformatf("pattern follows the array factor within %0.5f of the peak", worst));
    // first null on the positive side, then the highest side lobe beyond it
    first_null = 256;
    while (first_null < 511 && pat[first_null + 1] < pat[first_null]) first_null++;
    sll = -200.0;
    for (int i = 0; i <= 512; i++)
      if ((i > first_null || i < 512 - first_null) && db(pat[i], peak) > sll) sll = db(pat[i], peak);
    check(sll > -20.0 && sll < -17.0, $sformatf("highest side lobe %0.2f dB", sll));
    xover = db(pat[258], peak);
    check(xover > -1.5, $sformatf("adjacent-beam crossover %0.2f dB", xover));
    $display("side lobe %0.2f dB, crossover %0.2f dB, first null at %0.2f lines, max deviation %0.5f",
             sll, xover, 0.25 * (first_null - 256), worst);
    // each beam answers its own direction
    for (int m0 = -30; m0 <= 30; m0++) begin
      int best;
      real bm;
      send_wave(real'(m0));
      best = 0; bm = -1.0;
      for (int b = 0; b < 61; b++) if (got[b] > bm) begin bm = got[b]; best = b; end
      check(best == 30 - m0, $sformatf("wave at line %0d peaks at beam %0d", m0, best));
    end
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
