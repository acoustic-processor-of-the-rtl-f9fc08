// Measurement controller test with short ranges (4..9 cells) and a short
// repetition period. A model of the processing chain answers acq_run with
// cells of 61 amplitudes (value = 1000 * cell + beam). Checks: register
// read/write and clamping, start pulses (acq_clear, tx_trigger), the RAM
// writes (address order, decimated cells only, word layout), the stored
// cell count, stop of sampling, done and one interrupt request per
// measurement, auto repetition at the programmed period, and stop command.
module tb_meas_ctrl;
  import acp_pkg::*;
  localparam logic [4:0][31:0] CELLS  = {32'd9, 32'd8, 32'd6, 32'd5, 32'd4};
  localparam logic [4:0][31:0] DECIM  = {32'd3, 32'd2, 32'd2, 32'd1, 32'd1};
  localparam logic [4:0][31:0] PERIOD = {32'd90000, 32'd80000, 32'd70000, 32'd60000, 32'd50000};
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
  logic [35:0] ram_wdata;
  logic [2:0] irq_level;
  logic [7:0] irq_vector;
  int checks = 0, failures = 0;

  meas_ctrl #(.CELLS(CELLS), .DECIM(DECIM), .PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
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

  // processing-chain model: while acq_run, one cell every 200 clocks
  int cell_no = 0, n_clear = 0, n_tx = 0, n_irq = 0, cyc = 0;
  int start_cyc [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && acq_clear) begin n_clear++; cell_no = 0; end
    if (rst_n && tx_trigger) begin n_tx++; start_cyc.push_back(cyc); end
    if (rst_n && irq_req) n_irq++;
  end
  initial begin
    forever begin
      @(negedge clk);
      if (acq_run) begin
        repeat (100) @(negedge clk);
        for (int b = 0; b < 61 && acq_run; b++) begin
          mag_valid = 1; mag_beam = 6'(b); mag = 32'(1000 * cell_no + b);
          @(negedge clk); mag_valid = 0;
          @(negedge clk);
        end
        cell_no++;
      end
    end
  end

  logic [35:0] writes [$];
  logic [18:0] waddrs [$];
  always @(posedge clk) if (ram_we) begin writes.push_back(ram_wdata); waddrs.push_back(ram_addr); end

  task automatic one_ping(input int range_code);
    logic [31:0] v;
    int n, d, stored;
    n = int'(CELLS[range_code]); d = int'(DECIM[range_code]);
    writes.delete(); waddrs.delete();
    wr(REG_RANGE, 32'(range_code));
    wr(REG_CTRL, 32'h1);
    @(posedge clk);
    wait (!acq_run);
    repeat (400) @(posedge clk);
    stored = (n + d - 1) / d;
    check(writes.size() == stored * 61, $sformatf("range %0d: %0d words written, exp %0d", range_code, writes.size(), stored * 61));
    for (int i = 0; i < writes.size(); i++) begin
      check(waddrs[i] == 19'(i), "continuous block from 0");
      check(writes[i] == {4'd0, 32'(1000 * d * (i / 61) + i % 61)}, $sformatf("word %0d = %h", i, writes[i]));
    end
    rd(REG_CELLS, v);  check(v == 32'(stored), "stored cell count");
    rd(REG_STATUS, v); check(v[1:0] == 2'b10, "done, not busy");
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(REG_ID, v); check(v == 32'h4D47_3839, "board id");
    wr(REG_RANGE, 32'd7); rd(REG_RANGE, v); check(v == 32'd4, "range clamped to 4");
    wr(REG_PULSE, 32'd1); rd(REG_PULSE, v); check(v == 32'd1 && pulse == 2'd1, "pulse setting");
    wr(REG_IRQVEC, 32'h0000_0255); rd(REG_IRQVEC, v);
    check(irq_level == 3'd2 && irq_vector == 8'h55 && v == 32'h255, "interrupt level and vector");
    for (int r = 0; r < 5; r++) one_ping(r);
    check(n_irq == 5 && n_tx == 5 && n_clear == 5, $sformatf("irq %0d tx %0d clear %0d", n_irq, n_tx, n_clear));
    rd(REG_PINGS, v); check(v == 32'd5, "ping count");
    // status flags pass through
    fifo_overflow = 1; rd(REG_STATUS, v); check(v[2], "FIFO overflow visible");
    fifo_overflow = 0; bf_overrun = 1; rd(REG_STATUS, v); check(v[3], "overrun visible"); bf_overrun = 0;
    // auto mode: pings every PERIOD[0] clocks
    wr(REG_RANGE, 32'd0);
    start_cyc.delete();
    wr(REG_CTRL, 32'h3);
    wait (start_cyc.size() == 3);
    check(start_cyc[1] - start_cyc[0] == 50000 && start_cyc[2] - start_cyc[1] == 50000,
          $sformatf("repetition period %0d", start_cyc[1] - start_cyc[0]));
    // stop in the middle of a measurement
    wr(REG_CTRL, 32'h4);
    @(posedge clk); #1;
    check(!acq_run, "stop ends sampling");
    rd(REG_STATUS, v); check(v[0] == 1'b0, "not busy after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
