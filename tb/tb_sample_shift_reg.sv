// Loads a random 14-bit word into each of the 36 stages serially, with
// random ID markers, and checks that exactly the marked samples reach the
// FIFO, in channel order, and that the transfer takes 36 clocks.
module tb_sample_shift_reg;
  localparam int N = 36;
  logic clk = 0, rst_n = 0, clear = 0, bit_strobe = 0, load_done = 0;
  logic [N-1:0] sdo = '0, mark = '0;
  logic busy, fifo_we;
  logic signed [13:0] fifo_wdata;
  int checks = 0, failures = 0;

  sample_shift_reg #(.N(N), .W(14)) dut (.*);

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

  logic [13:0] words [N];
  logic [13:0] got [$];
  always @(posedge clk) if (fifo_we) got.push_back(fifo_wdata);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int t0, dur;
      for (int k = 0; k < N; k++) words[k] = 14'($urandom);
      for (int k = 0; k < N; k++) mark[k] = (round < 6) ? ((k % 3) == round / 2) : 1'($urandom);
      if (round == 19) mark = '0;
      for (int b = 13; b >= 0; b--) begin
        @(negedge clk);
        for (int k = 0; k < N; k++) sdo[k] = words[k][b];
        bit_strobe = 1;
        @(negedge clk);
        bit_strobe = 0;
      end
      got.delete();
      @(negedge clk); load_done = 1;
      @(negedge clk); load_done = 0;
      t0 = $time;
      wait (!busy);
      dur = ($time - t0) / 10 + 1;
      @(negedge clk);
      check(dur == N, $sformatf("transfer %0d clocks", dur));
      begin
        automatic int j = 0;
        for (int k = 0; k < N; k++) if (mark[k]) begin
          if (j < got.size()) check(got[j] == words[k], $sformatf("round %0d ch %0d", round, k + 1));
          j++;
        end
        check(j == got.size(), $sformatf("round %0d: %0d marked, %0d written", round, j, got.size()));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
