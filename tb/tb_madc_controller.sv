// Drives the A/D card controller with 36 converter models. Every conversion
// each channel gets a new random code; the test checks that each conversion
// delivers 12 FIFO words, that they are the codes of channels c with
// c mod 3 == phase / 2 in ascending order, sign-extended to 16 bits, and
// that the transfer ends well inside the 5.76 us conversion period.
module tb_madc_controller;
  localparam int N = 36;
  logic clk = 0, rst_n = 0, run = 0;
  logic [N-1:0] sdo;
  logic sclk, stc, tick, fifo_we;
  logic [2:0] phase;
  logic [15:0] fifo_wdata;
  real vin [N];
  int checks = 0, failures = 0;

  madc_controller dut (.*);

  for (genvar c = 0; c < N; c++) begin : g_adc
    adc_model u_adc (.sclk, .stc, .vin(vin[c]), .sdo(sdo[c]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [13:0] code [N];
  logic signed [13:0] held [N];
  logic [2:0] held_phase;
  int  nconv = 0, cyc = 0, tick_cyc = 0, last_we = 0;
  logic [15:0] got [$];

  always @(posedge clk) begin
    cyc++;
    if (fifo_we) begin got.push_back(fifo_wdata); last_we = cyc; end
    if (tick) begin
      if (nconv > 0) begin
        automatic int j = 0;
        for (int c = 0; c < N; c++) if (c % 3 == int'(held_phase) / 2) begin
          if (j < got.size())
            check(got[j] == 16'(held[c]), $sformatf("conv %0d ch %0d got %h exp %h", nconv, c + 1, got[j], 16'(held[c])));
          j++;
        end
        check(got.size() == 12, $sformatf("conv %0d: %0d words", nconv, got.size()));
        check(last_we - tick_cyc < 200, "transfer finished early in the period");
      end
      got.delete();
      for (int c = 0; c < N; c++) begin
        code[c] = 14'($urandom);
        vin[c]  = real'(code[c]) / 8192.0;
        held[c] = code[c];
      end
      held_phase = phase;
      tick_cyc = cyc;
      nconv++;
    end
  end

  initial begin
    for (int c = 0; c < N; c++) vin[c] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); run = 1;
    wait (nconv == 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
