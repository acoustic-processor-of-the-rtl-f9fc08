// Frequency-response test of the beam filters. Two beams are fed complex
// tones A exp(j 2 pi f n / fs) at the beam rate fs = 28933.3 Hz; after the
// filters have settled the output magnitude must equal A |H(f)|, where for a
// bilinear-transformed Butterworth filter
//   |H_lp|^2 = 1 / (1 + (tan(pi f / fs) / tan(pi f_lp / fs))^16)
//   |H_hp|^2 = 1 / (1 + (tan(pi f_hp / fs) / tan(pi f / fs))^8)
// Pass-band, low-pass stop-band, high-pass stop-band and cut-off tones are
// checked for all three pulse settings, so a wrong order, cut-off or
// setting shows.
module tb_beam_filter;
  import acp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 173600.0 / 6.0;
  localparam real A  = 1.0e6;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [1:0] pulse = 0;
  beam_sample_t in = '0, out;
  logic busy, out_valid;
  int checks = 0, failures = 0;

  beam_filter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mag_last [64];
  always @(posedge clk)
    if (out_valid) mag_last[out.beam] = $sqrt(real'(out.re) * real'(out.re) + real'(out.im) * real'(out.im));

  function automatic real hmag(input real f, input real flp, input real fhp);
    real l, h, r;
    r = $tan(PI * f / FS) / $tan(PI * flp / FS);
    l = 1.0 / $sqrt(1.0 + r ** 16);
    r = $tan(PI * fhp / FS) / $tan(PI * f / FS);
    h = 1.0 / $sqrt(1.0 + r ** 8);
    return l * h;
  endfunction

  task automatic send(input int beam, input real ph);
    wait (!busy);
    @(negedge clk);
    in.beam = 6'(beam);
    in.re = 32'($rtoi(A * $cos(ph)));
    in.im = 32'($rtoi(A * $sin(ph)));
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
  endtask

  task automatic run(input int mode, input real f1, input real f2, input int n);
    real flp, fhp, e1, e2;
    flp = (mode == 0) ? 5000.0 : (mode == 1) ? 2000.0 : 1000.0;
    fhp = (mode == 0) ? 100.0 : (mode == 1) ? 40.0 : 20.0;
    @(negedge clk); pulse = 2'(mode); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      send(5,  2.0 * PI * f1 * i / FS);
      send(40, 2.0 * PI * f2 * i / FS);
    end
    wait (!busy); repeat (3) @(posedge clk);
    e1 = A * hmag(f1, flp, fhp);
    e2 = A * hmag(f2, flp, fhp);
    check(mag_last[5]  > e1 * 0.98 - 30.0 && mag_last[5]  < e1 * 1.02 + 30.0,
          $sformatf("mode %0d f %0.0f: |y| %0.1f expected %0.1f", mode, f1, mag_last[5], e1));
    check(mag_last[40] > e2 * 0.98 - 30.0 && mag_last[40] < e2 * 1.02 + 30.0,
          $sformatf("mode %0d f %0.0f: |y| %0.1f expected %0.1f", mode, f2, mag_last[40], e2));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1000.0, 9000.0, 3000);   // pass band / low-pass stop band
    run(0, -2500.0, 30.0, 3000);    // pass band / high-pass stop band
    run(1, 1500.0, 4500.0, 3000);
    run(1, -600.0, 12.0, 4000);
    run(2, 500.0, 3000.0, 4000);
    run(2, -300.0, 5.0, 9000);
    run(0, 5000.0, 100.0, 9000);    // both cut-offs (-3 dB) of each setting
    run(1, -2000.0, 40.0, 9000);
    run(2, 1000.0, -20.0, 12000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
