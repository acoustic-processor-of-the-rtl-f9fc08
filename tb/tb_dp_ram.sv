// Random reads and writes on both ports of the 512K x 36 buffer against an
// associative-array model: one-clock read latency, old data on read during
// write, both ports independent, port A winning a same-address write.
module tb_dp_ram;
  localparam int AW = 19;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [35:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [35:0] model [int];

  dp_ram dut (.*);

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

  // a small pool of addresses spread over the whole range, so reads hit
  function automatic logic [AW-1:0] pick();
    return AW'(($urandom % 64) * 8191 + 1);
  endfunction

  initial begin
    logic [35:0] exp_a, exp_b;
    bit chk_a, chk_b;
    // initialise the pool through port B
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = AW'(i * 8191 + 1); b_wdata = {4'(i), 32'($urandom)};
      model[int'(b_addr)] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = a_en && 1'($urandom); a_addr = pick(); a_wdata = {$urandom, $urandom} ;
      b_en = 1'($urandom); b_we = b_en && 1'($urandom); b_addr = (i % 7 == 0) ? a_addr : pick(); b_wdata = {$urandom, $urandom};
      chk_a = a_en && !a_we; chk_b = b_en && !b_we;
      exp_a = model[int'(a_addr)]; exp_b = model[int'(b_addr)];
      if (b_we) model[int'(b_addr)] = b_wdata;
      if (a_we) model[int'(a_addr)] = a_wdata;
      @(posedge clk); #1;
      if (chk_a) check(a_rdata == exp_a, $sformatf("port A read %h exp %h", a_rdata, exp_a));
      if (chk_b) check(b_rdata == exp_b, $sformatf("port B read %h exp %h", b_rdata, exp_b));
    end
    // read back everything through port A
    a_we = 0; b_en = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); a_en = 1; a_addr = AW'(i * 8191 + 1);
      @(posedge clk); #1;
      check(a_rdata == model[int'(a_addr)], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
