// Random and edge-case beam samples: the result must be the integer
// square root of re^2 + im^2 (r^2 <= v < (r+1)^2, worked out in the test
// with 64-bit arithmetic), carry the beam number and arrive 32 clocks after
// the input.
module tb_beam_magnitude;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  beam_sample_t in = '0;
  logic busy, out_valid;
  logic [5:0] out_beam;
  logic [31:0] out_mag;
  int checks = 0, failures = 0;

  beam_magnitude dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic signed [31:0] re, im;
      logic [63:0] v, r, r1;
      int t0, lat;
      case (i)
        0: begin re = 0; im = 0; end
        1: begin re = 32'sh7fffffff; im = 32'sh7fffffff; end
        2: begin re = -32'sh7fffffff; im = 3; end
        3: begin re = 3; im = 4; end
        default: begin
          re = (i % 3 == 0) ? $signed($urandom) : $signed($urandom) >>> ($urandom % 31);
          im = (i % 3 == 0) ? $signed($urandom) : $signed($urandom) >>> ($urandom % 31);
        end
      endcase
      @(negedge clk);
      in.beam = 6'(i % 61); in.re = re; in.im = im; in_valid = 1;
      t0 = $time;
      @(negedge clk); in_valid = 0;
      wait (out_valid);
      lat = ($time - t0) / 10;
      v  = 64'(64'(re) * 64'(re)) + 64'(64'(im) * 64'(im));
      r  = 64'(out_mag);
      r1 = r + 1;
      check(r * r <= v && (r1 * r1 > v || r1 * r1 < r * r), $sformatf("sqrt(%0d) = %0d", v, r));
      check(out_beam == 6'(i % 61), "beam number");
      check(lat == 32, $sformatf("latency %0d", lat));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
