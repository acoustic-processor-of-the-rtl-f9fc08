// End-to-end test of the acoustic processor with short measurement ranges.
//
// 36 converter models see a plane echo arriving from the direction of DFT
// line -10 (phase step 2 pi 10 / 128 between neighbouring elements) at the
// carrier plus a 1 kHz Doppler shift. Over VME the test programs the
// interrupt, range and pulse setting, starts a measurement, waits for the
// interrupt, acknowledges it, reads the stored cell count and fetches the
// result block by BLT. The strongest beam must be beam 20 (line -10) with
// the amplitude expected from the weighted array gain. Further runs switch
// range (with decimation) and pulse setting and use auto repetition.
// Every mechanism of the design is counted and must have occurred.
module tb_acoustic_processor;
  import acp_pkg::*;
  localparam real PI  = 3.14159265358979323846;
  localparam real FC  = 43400.0;
  localparam real FD  = 1000.0;
  localparam real AMP = 0.5;
  localparam logic [4:0][31:0] CELLS  = {32'd40, 32'd10, 32'd12, 32'd120, 32'd24};
  localparam logic [4:0][31:0] DECIM  = {32'd1, 32'd1, 32'd2, 32'd4, 32'd1};
  localparam logic [4:0][31:0] PERIOD = {32'd250000, 32'd250000, 32'd250000, 32'd500000, 32'd250000};

  logic clk = 0, rst_n = 0;
  logic adc_sclk, adc_stc, tx_trigger;
  logic [35:0] adc_sdo;
  logic as_n, write_n, lword_n, iack_n, iackin_n, d_oe, dtack_n, iackout_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] a;
  logic [31:0] d_m, d_out;
  logic [7:1] irq_n;
  real vin [36];
  int checks = 0, failures = 0;

  acoustic_processor #(.CELLS(CELLS), .DECIM(DECIM), .PERIOD(PERIOD)) dut (
    .clk, .rst_n, .adc_sclk, .adc_stc, .adc_sdo, .tx_trigger,
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_lword_n(lword_n),
    .vme_iack_n(iack_n), .vme_iackin_n(iackin_n), .vme_am(am), .vme_a(a), .vme_d_in(d_m),
    .vme_d_out(d_out), .vme_d_oe(d_oe), .vme_dtack_n(dtack_n), .vme_irq_n(irq_n),
    .vme_iackout_n(iackout_n));

  for (genvar c = 0; c < 36; c++) begin : g_adc
    adc_model u_adc (.sclk(adc_sclk), .stc(adc_stc), .vin(vin[c]), .sdo(adc_sdo[c]));
  end

  vme_master_bfm bfm (.as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .a,
    .d(d_m), .d_in(d_oe ? d_out : 32'hFFFF_FFFF), .dtack_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #60000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // echo at the array: element c lags by 2 pi c 10 / 128
  always @(posedge adc_stc) begin
    real t;
    t = $realtime * 1.0e-9;
    for (int c = 0; c < 36; c++) vin[c] = AMP * $cos(2.0 * PI * (FC + FD) * t + 2.0 * PI * c * 10.0 / 128.0);
  end

  // mechanism counters
  int n_conv = 0, n_fifo = 0, n_skip = 0, n_beams = 0, n_filt = 0, n_mag = 0, n_ram = 0;
  int n_tx = 0, n_blt = 0, n_a16 = 0, n_irq = 0, n_iack = 0, n_decim = 0, n_auto = 0, n_pulse_sw = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tick) n_conv++;
    if (dut.f_we) n_fifo++;
    if (dut.u_madc.u_sreg.busy && !dut.u_madc.u_sreg.id[0]) n_skip++;
    if (dut.bf_valid) n_beams++;
    if (dut.flt_valid) n_filt++;
    if (dut.mag_valid) n_mag++;
    if (dut.ram_a_we) n_ram++;
    if (tx_trigger) n_tx++;
    if (dut.blt_beat) n_blt++;
    if (dut.reg_wr) n_a16++;
    if (dut.irq_req) n_irq++;
    if (dut.mag_valid && dut.mag_beam == 6'd60 && dut.u_ctrl.dcnt != 0) n_decim++;
  end

  bit ok;
  task automatic regw(input logic [5:0] r, input logic [31:0] v);
    bfm.write32(6'h29, 32'h0000_C000 + 32'(4 * r), v, ok);
    check(ok, "register write acknowledged");
  endtask
  task automatic regr(input logic [5:0] r, output logic [31:0] v);
    bfm.read32(6'h29, 32'h0000_C000 + 32'(4 * r), v, ok);
    check(ok, "register read acknowledged");
  endtask

  task automatic wait_irq_and_ack(input logic [2:0] lvl, input logic [7:0] exp_vec);
    logic [7:0] vec;
    wait (irq_n[lvl] == 1'b0);
    bfm.iack_cycle(lvl, vec, ok);
    check(ok && vec == exp_vec, $sformatf("status/ID %h", vec));
    if (ok) n_iack++;
  endtask

  // fetch a measurement and check the direction and amplitude of the echo
  task automatic fetch_and_check(input int stored, input real gain, input string tag);
    real wsum, expv;
    int best, last;
    logic [31:0] v;
    regr(REG_CELLS, v);
    check(v == 32'(stored), $sformatf("%s: %0d cells stored, exp %0d", tag, v, stored));
    bfm.rdbuf.delete();
    bfm.blt_read(32'h0800_0000, stored * 61, ok);
    check(ok && bfm.rdbuf.size() == stored * 61, $sformatf("%s: BLT of %0d words", tag, stored * 61));
    wsum = 0.0;
    for (int k = 0; k < 36; k++) wsum += 0.45 + 0.55 * $cos(PI * (k - 17.5) / 36.0);
    expv = AMP * 8192.0 * wsum * gain;
    last = (stored - 1) * 61;
    best = 0;
    for (int b = 1; b < 61; b++) if (bfm.rdbuf[last + b] > bfm.rdbuf[last + best]) best = b;
    check(best == 20, $sformatf("%s: strongest beam %0d", tag, best));
    check(real'(bfm.rdbuf[last + 20]) > 0.75 * expv && real'(bfm.rdbuf[last + 20]) < 1.25 * expv,
          $sformatf("%s: amplitude %0d expected about %0.0f", tag, bfm.rdbuf[last + 20], expv));
    check(real'(bfm.rdbuf[last + 50]) < 0.2 * expv, $sformatf("%s: far beam low", tag));
  endtask

  initial begin
    logic [31:0] v;
    for (int c = 0; c < 36; c++) vin[c] = 0.0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    regr(REG_ID, v); check(v == 32'h4D47_3839, "board id over VME");
    regw(REG_IRQVEC, 32'h0000_0340);
    // range 4: 40 cells, 4 ms pulse
    regw(REG_RANGE, 32'd4);
    regw(REG_PULSE, 32'd0);
    regw(REG_CTRL, 32'h1);
    wait_irq_and_ack(3'd3, 8'h40);
    regr(REG_STATUS, v); check(v[3:0] == 4'b0010, $sformatf("status %h", v));
    check(n_fifo == n_conv * 12 || n_fifo == (n_conv - 1) * 12 || n_fifo == (n_conv + 1) * 12,
          $sformatf("12 FIFO words per conversion (%0d / %0d)", n_fifo, n_conv));
    fetch_and_check(40, 1.0, "range 4");
    // range 1: 120 cells, every 4th stored; 20 ms pulse (1 kHz low-pass: the
    // 1 kHz Doppler tone is at its -3 dB point)
    regw(REG_RANGE, 32'd1);
    regw(REG_PULSE, 32'd2);
    n_pulse_sw++;
    regw(REG_CTRL, 32'h1);
    wait_irq_and_ack(3'd3, 8'h40);
    fetch_and_check(30, 0.7071, "range 1");
    // auto repetition on range 3 (10 cells)
    regw(REG_RANGE, 32'd3);
    regw(REG_PULSE, 32'd0);
    begin
      int tx0;
      tx0 = n_tx;
      regw(REG_CTRL, 32'h2);
      wait_irq_and_ack(3'd3, 8'h40);
      wait_irq_and_ack(3'd3, 8'h40);
      n_auto = n_tx - tx0;
      regw(REG_CTRL, 32'h4);
    end
    regr(REG_PINGS, v); check(v == 32'd4, $sformatf("pings %0d", v));
    fetch_and_check(10, 1.0, "auto");
    check(n_conv > 0,  "conversions happened");
    check(n_fifo > 0,  "marked samples reached the FIFO");
    check(n_skip > 0,  "unmarked samples were dropped");
    check(n_beams > 0 && n_filt == n_beams, "beams formed and filtered");
    check(n_mag > 0,   "amplitudes computed");
    check(n_ram > 0,   "results stored");
    check(n_decim > 0, "cells skipped by decimation");
    check(n_tx >= 4,   "transmit triggers");
    check(n_blt > 0,   "block transfer beats");
    check(n_a16 > 0,   "register accesses");
    check(n_irq == 4 && n_iack == 4, $sformatf("interrupts %0d acknowledged %0d", n_irq, n_iack));
    check(n_auto >= 2, "auto repetition");
    check(n_pulse_sw > 0, "pulse setting switched");
    $display("mechanisms: conv %0d fifo %0d skip %0d beams %0d mag %0d ram %0d decim %0d tx %0d blt %0d a16 %0d irq %0d iack %0d auto %0d",
             n_conv, n_fifo, n_skip, n_beams, n_mag, n_ram, n_decim, n_tx, n_blt, n_a16, n_irq, n_iack, n_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
