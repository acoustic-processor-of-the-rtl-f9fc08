// Checks the conversion timing: period of 576 clocks (5.76 us at 100 MHz),
// phase sequence 0..5, one STC seen on exactly one rising edge of the
// converter clock, 14 bit strobes one converter-clock period apart, each in
// the cycle after a rising edge, and one word_done after the last strobe.
module tb_madc_timing;
  logic clk = 0, rst_n = 0, run = 0;
  logic sclk, stc, tick, bit_strobe, word_done;
  logic [2:0] phase;
  int checks = 0, failures = 0;

  madc_timing dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_tick = -1, nstrobe = 0, last_strobe = -1, nstc_edges = 0, ndone = 0, nticks = 0;
  logic [2:0] exp_phase = 0;
  logic sclk_d = 0;

  always @(posedge clk) begin
    cyc++;
    sclk_d <= sclk;
    if (tick) begin
      if (last_tick >= 0) begin
        check(cyc - last_tick == 576, $sformatf("tick period %0d", cyc - last_tick));
        check(nstrobe == 14, $sformatf("strobes per word %0d", nstrobe));
        check(nstc_edges == 1, $sformatf("stc edges %0d", nstc_edges));
        check(ndone == 1, "one word_done");
      end
      check(phase == exp_phase, $sformatf("phase %0d expected %0d", phase, exp_phase));
      exp_phase = (exp_phase == 5) ? 0 : exp_phase + 1;
      last_tick = cyc; nstrobe = 0; nstc_edges = 0; ndone = 0; nticks++;
    end
    if (sclk && !sclk_d && stc) nstc_edges++;
    if (bit_strobe) begin
      check(sclk && !sclk_d, "strobe in the cycle after a rising edge");
      if (nstrobe > 0) check(cyc - last_strobe == 4, "strobes one sclk period apart");
      nstrobe++; last_strobe = cyc;
    end
    if (word_done) begin
      check(nstrobe == 14 && cyc - last_strobe == 1, "word_done right after 14th strobe");
      ndone++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); run = 1;
    wait (nticks == 14);
    @(posedge clk); run = 0;
    repeat (700) @(posedge clk);
    check(nticks == 14, "no ticks while stopped");
    check(phase == 0, "phase cleared when stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
