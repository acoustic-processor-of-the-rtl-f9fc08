// Random writes and reads against a queue model: data order, empty/full,
// a write when full being dropped and setting the sticky overflow flag,
// and clear emptying the FIFO and resetting the flag.
module tb_sample_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [15:0] model [$];

  sample_fifo #(.W(16), .DEPTH(DEPTH)) dut (.*);

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
    bit exp_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(overflow == exp_ovf, "overflow flag");
      if (!empty) check(rd_data == model[0], $sformatf("data %h exp %h", rd_data, model[0]));
      // bias towards filling in the first half, draining in the second
      wr_en   = ($urandom % 100) < ((i % 1000) < 500 ? 70 : 30);
      rd_en   = !empty && (($urandom % 100) < ((i % 1000) < 500 ? 30 : 70));
      wr_data = 16'($urandom);
      clear   = (i == 2000);
      @(posedge clk);
      #1;
      if (clear) begin
        model.delete(); exp_ovf = 0;
      end else begin
        automatic bit was_full = (model.size() == DEPTH);
        if (rd_en) void'(model.pop_front());
        if (wr_en) begin
          if (!was_full) model.push_back(wr_data);
          else exp_ovf = 1;
        end
      end
    end
    check(exp_ovf, "overflow was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
