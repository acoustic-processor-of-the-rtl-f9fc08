// Range workload test: the measurement controller and the dual-port result
// buffer at their default sizes, run through all five measurement ranges.
//
// A model of the processing chain answers acq_run with one amplitude every
// second clock, beam 0..60 in turn (value = 64 * cell + beam), so a range
// takes cells * 122 clocks instead of its real echo time. For each range the
// test checks, against figures worked out here from the range table (range,
// repetition period T, echo time t_p):
//   - one transmit trigger and one clear per measurement;
//   - the number of cells consumed, times 34.56 us, matches the table's
//     t_p to its printed precision (0.5 ms);
//   - the number of stored cells (REG_CELLS) and of buffer writes, and that
//     the block ends inside the 512K-word buffer;
//   - one interrupt request at the end and the done bit;
//   - sampled buffer words read back through port B hold the expected
//     decimated cells in the {4'b0, amplitude} layout.
// It first runs range 0 in auto mode and checks that two transmit triggers
// are exactly T = 0.6 s (60,000,000 clocks at 100 MHz) apart.
// The decimation factors (1, 1, 2, 4, 8) are this design's choice; the
// table values come from the document.
module tb_meas_ranges;
  import acp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [5:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic fifo_overflow = 0, bf_overrun = 0;
  logic acq_run, acq_clear, tx_trigger, ram_we, irq_req, mag_valid = 0;
  logic [1:0] pulse;
  logic [5:0] mag_beam = '0;
  logic [31:0] mag = '0;
  logic [18:0] ram_addr;
  logic [35:0] ram_wdata, a_rdata, b_rdata;
  logic [2:0] irq_level;
  logic [7:0] irq_vector;
  logic b_en = 0;
  logic [18:0] b_addr = '0;
  int checks = 0, failures = 0;

  meas_ctrl dut (.*);
  dp_ram ram (
    .clk, .a_en(ram_we), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata), .a_rdata,
    .b_en, .b_we(1'b0), .b_addr, .b_wdata(36'd0), .b_rdata
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    wait (cyc == 200_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [5:0] ad, input logic [31:0] v);
    @(negedge clk); reg_wr = 1; reg_addr = ad; reg_wdata = v;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [5:0] ad, output logic [31:0] v);
    @(negedge clk); reg_addr = ad; #1 v = reg_rdata;
  endtask
  task automatic ram_rd(input int a, output logic [35:0] v);
    @(negedge clk); b_en = 1; b_addr = 19'(a);
    @(negedge clk); b_en = 0; v = b_rdata;
  endtask

  // processing-chain model
  int cell_no = 0, beam_no = 0, n_clear = 0, n_tx = 0, n_irq = 0, n_we = 0, max_addr = 0;
  longint tx_cyc [$];
  always @(negedge clk) begin
    if (acq_clear) begin cell_no = 0; beam_no = 0; end
    if (rst_n && acq_run && !mag_valid) begin
      mag_valid = 1; mag_beam = 6'(beam_no); mag = 32'(64 * cell_no + beam_no);
      if (beam_no == N_BEAMS - 1) begin beam_no = 0; cell_no++; end
      else beam_no++;
    end else mag_valid = 0;
  end
  always @(posedge clk) begin
    if (rst_n && acq_clear) n_clear++;
    if (rst_n && tx_trigger) begin n_tx++; tx_cyc.push_back(cyc); end
    if (rst_n && irq_req) n_irq++;
    if (rst_n && ram_we) begin n_we++; if (int'(ram_addr) > max_addr) max_addr = int'(ram_addr); end
  end

  // range table of the document and this design's decimation
  int    rng_m [5] = '{100, 200, 400, 800, 1600};
  real   t_p   [5] = '{0.135, 0.270, 0.540, 1.081, 2.162};
  real   t_rep [5] = '{0.6, 0.8, 1.3, 2.0, 4.0};
  int    decim [5] = '{1, 1, 2, 4, 8};

  function automatic real fabs(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin
    logic [31:0] v;
    logic [35:0] w;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // auto repetition at the default period of range 0
    wr(REG_RANGE, 32'd0);
    wr(REG_CTRL, 32'h2);
    wait (tx_cyc.size() == 2);
    check(tx_cyc[1] - tx_cyc[0] == 64'd60_000_000,
          $sformatf("auto period %0d clocks, expected 60000000 (T = 0.6 s)", tx_cyc[1] - tx_cyc[0]));
    wr(REG_CTRL, 32'h4);
    for (int r = 0; r < 5; r++) begin
      int tx0, cl0, irq0, stored, k, b;
      real t_meas;
      wr(REG_RANGE, 32'(r));
      tx0 = n_tx; cl0 = n_clear; irq0 = n_irq; n_we = 0; max_addr = 0;
      wr(REG_CTRL, 32'h1);
      wait (n_irq == irq0 + 1);
      repeat (4) @(negedge clk);
      check(n_tx == tx0 + 1 && n_clear == cl0 + 1, $sformatf("range %0d: one trigger and one clear", r));
      // cells consumed against the echo time of the table
      t_meas = real'(cell_no) * 34.56e-6;
      check(fabs(t_meas - t_p[r]) < 0.5e-3,
            $sformatf("range %0d m: %0d cells = %f s, table t_p %f s", rng_m[r], cell_no, t_meas, t_p[r]));
      check(t_meas < t_rep[r], $sformatf("range %0d: measurement shorter than T", r));
      stored = (cell_no + decim[r] - 1) / decim[r];
      rd(REG_CELLS, v);
      check(int'(v) == stored, $sformatf("range %0d: REG_CELLS %0d, expected %0d", r, v, stored));
      check(n_we == stored * N_BEAMS, $sformatf("range %0d: %0d buffer writes, expected %0d", r, n_we, stored * N_BEAMS));
      check(max_addr == stored * N_BEAMS - 1 && max_addr < 524288,
            $sformatf("range %0d: block ends at %0d", r, max_addr));
      rd(REG_STATUS, v);
      check(v[1:0] == 2'b10, $sformatf("range %0d: done and not busy (status %h)", r, v));
      // sampled read-back, including the first and the last word
      for (int i = 0; i < 40; i++) begin
        k = (i == 0) ? 0 : (i == 1) ? stored - 1 : int'($urandom_range(stored - 1));
        b = (i == 1) ? N_BEAMS - 1 : int'($urandom_range(N_BEAMS - 1));
        ram_rd(k * N_BEAMS + b, w);
        check(w == {4'd0, 32'(64 * k * decim[r] + b)},
              $sformatf("range %0d: word cell %0d beam %0d = %h", r, k, b, w));
      end
      $display("range %0d m: %0d cells, %0d stored, %0d words of 524288", rng_m[r], cell_no, stored, n_we);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
