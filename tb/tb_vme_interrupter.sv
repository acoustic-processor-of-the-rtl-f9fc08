// Checks the interrupter: no IRQ line before a request; after one, only the
// programmed line is pulled; an acknowledge for another level is passed on
// through IACKOUT and not answered; the acknowledge for the right level
// returns the status/ID and releases the line; a second acknowledge is then
// passed on; level 0 disables requests. The request, pass-on and answer
// sequence is then repeated for each of the seven levels with a random
// status/ID.
module tb_vme_interrupter;
  logic clk = 0, rst_n = 0, irq_req = 0;
  logic [2:0] level = 3'd5;
  logic [7:0] vector = 8'hA7;
  logic as_n, write_n, lword_n, iack_n, iackin_n, dtack_n, d_oe, iackout_n, pending;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] a;
  logic [31:0] d_m;
  logic [7:0] d_out;
  logic [7:1] irq_n;
  int checks = 0, failures = 0;

  vme_interrupter dut (.clk, .rst_n, .irq_req, .level, .vector, .as_n, .ds0_n(ds_n[0]),
    .iackin_n, .a(a[3:1]), .irq_n, .iackout_n, .d_out, .d_oe, .dtack_n, .pending);

  vme_master_bfm bfm (.as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .a,
    .d(d_m), .d_in(d_oe ? {24'd0, d_out} : 32'hFFFF_FFFF), .dtack_n);

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

  int iackout_seen = 0;
  always @(negedge iackout_n) iackout_seen++;

  initial begin
    bit ok;
    logic [7:0] vec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(irq_n == 7'h7F, "no IRQ before a request");
    @(negedge clk) irq_req = 1; @(negedge clk) irq_req = 0;
    @(posedge clk); #1;
    check(irq_n == ~(7'b1 << 4), $sformatf("IRQ5 only: %b", irq_n));
    // acknowledge of another level: passed on
    bfm.iack_cycle(3'd2, vec, ok);
    check(!ok, "level 2 acknowledge not answered");
    check(iackout_seen == 1, "level 2 acknowledge passed down the chain");
    check(irq_n[5] == 1'b0, "still requesting");
    // acknowledge of our level
    bfm.iack_cycle(3'd5, vec, ok);
    check(ok && vec == 8'hA7, $sformatf("status/ID %h", vec));
    check(iackout_seen == 1, "own acknowledge not passed on");
    repeat (3) @(posedge clk); #1;
    check(irq_n == 7'h7F && !pending, "IRQ released on acknowledge");
    bfm.iack_cycle(3'd5, vec, ok);
    check(!ok && iackout_seen == 2, "nothing pending: passed on");
    // another level and vector
    level = 3'd1; vector = 8'h3C;
    @(negedge clk) irq_req = 1; @(negedge clk) irq_req = 0;
    @(posedge clk); #1;
    check(irq_n == 7'b111_1110, "IRQ1");
    bfm.iack_cycle(3'd1, vec, ok);
    check(ok && vec == 8'h3C, "second status/ID");
    level = 3'd0;
    @(negedge clk) irq_req = 1; @(negedge clk) irq_req = 0;
    repeat (3) @(posedge clk); #1;
    check(irq_n == 7'h7F && !pending, "level 0 disables");
    // every level: only its own line, other levels passed on, own answered
    for (int l = 1; l <= 7; l++) begin
      automatic int other = (l % 7) + 1;
      automatic logic [7:0] v = 8'($urandom);
      automatic int seen0;
      level = 3'(l); vector = v;
      @(negedge clk) irq_req = 1; @(negedge clk) irq_req = 0;
      @(posedge clk); #1;
      check(irq_n == ~(7'(1) << (l - 1)), $sformatf("level %0d: IRQ lines %b", l, irq_n));
      seen0 = iackout_seen;
      bfm.iack_cycle(3'(other), vec, ok);
      check(!ok && iackout_seen == seen0 + 1, $sformatf("level %0d: acknowledge %0d passed on", l, other));
      bfm.iack_cycle(3'(l), vec, ok);
      check(ok && vec == v && iackout_seen == seen0 + 1, $sformatf("level %0d: status/ID %h expected %h", l, vec, v));
      repeat (3) @(posedge clk); #1;
      check(irq_n == 7'h7F && !pending, $sformatf("level %0d: released", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
