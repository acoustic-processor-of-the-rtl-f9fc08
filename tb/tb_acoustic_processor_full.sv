// Full-size run of the acoustic processor with every parameter at its
// default: one complete 100 m measurement (3906 cells, t_p = 0.135 s of
// echo at one cell per 34.56 us) of a plane echo from the direction of DFT
// line -10 with a 1 kHz Doppler shift, followed by the interrupt, its
// acknowledge and a BLT read of the whole 3906 x 61 word result block.
// Checks the measurement time, the stored cell count, the strongest beam
// (20) and its amplitude in every 100th cell after the filters settle.
module tb_acoustic_processor_full;
  import acp_pkg::*;
  localparam real PI  = 3.14159265358979323846;
  localparam real FC  = 43400.0;
  localparam real FD  = 1000.0;
  localparam real AMP = 0.5;

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

  acoustic_processor dut (
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
    #400000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge adc_stc) begin
    real t;
    t = $realtime * 1.0e-9;
    for (int c = 0; c < 36; c++) vin[c] = AMP * $cos(2.0 * PI * (FC + FD) * t + 2.0 * PI * c * 10.0 / 128.0);
  end

  realtime t_tx = 0, t_irq = 0;
  always @(posedge clk) if (rst_n && tx_trigger) t_tx = $realtime;

  bit ok;
  initial begin
    logic [31:0] v;
    logic [7:0] vec;
    real wsum, expv, tp;
    for (int c = 0; c < 36; c++) vin[c] = 0.0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    bfm.write32(6'h29, 32'h0000_C000 + 4 * REG_RANGE, 32'd0, ok); check(ok, "range");
    bfm.write32(6'h29, 32'h0000_C000 + 4 * REG_PULSE, 32'd0, ok); check(ok, "pulse");
    bfm.write32(6'h29, 32'h0000_C000 + 4 * REG_CTRL, 32'd1, ok);  check(ok, "start");
    wait (irq_n[3] == 1'b0);
    t_irq = $realtime;
    tp = (t_irq - t_tx) * 1.0e-9;
    check(tp > 0.1349 && tp < 0.1353, $sformatf("measurement took %0.6f s, t_p = 0.135 s", tp));
    bfm.iack_cycle(3'd3, vec, ok);
    check(ok && vec == 8'h40, "interrupt acknowledged with the default status/ID");
    bfm.read32(6'h29, 32'h0000_C000 + 4 * REG_CELLS, v, ok);
    check(ok && v == 32'd3906, $sformatf("%0d cells stored", v));
    bfm.blt_read(32'h0800_0000, 3906 * 61, ok);
    check(ok && bfm.rdbuf.size() == 3906 * 61, "whole block read by BLT");
    wsum = 0.0;
    for (int k = 0; k < 36; k++) wsum += 0.45 + 0.55 * $cos(PI * (k - 17.5) / 36.0);
    expv = AMP * 8192.0 * wsum;
    for (int ci = 100; ci < 3906; ci += 100) begin
      int best, base;
      base = ci * 61;
      best = 0;
      for (int b = 1; b < 61; b++) if (bfm.rdbuf[base + b] > bfm.rdbuf[base + best]) best = b;
      check(best == 20, $sformatf("cell %0d: strongest beam %0d", ci, best));
      check(real'(bfm.rdbuf[base + 20]) > 0.75 * expv && real'(bfm.rdbuf[base + 20]) < 1.25 * expv,
            $sformatf("cell %0d: amplitude %0d, about %0.0f expected", ci, bfm.rdbuf[base + 20], expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
