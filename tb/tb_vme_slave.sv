// Drives the VME slave with a bus-master model: A16/D32 register writes and
// reads, A32/D32 single RAM writes and reads, a BLT read of a block written
// beforehand, and cycles that must not be answered (wrong address, wrong
// modifier, D16, interrupt acknowledge). A register file and a RAM with one
// clock of read latency stand for the rest of the board.
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  logic as_n, write_n, lword_n, iack_n, iackin_n, dtack_n, d_oe;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] a;
  logic [31:0] d_m, d_out;
  logic reg_wr, ram_en, ram_we, blt_beat;
  logic [5:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [18:0] ram_addr;
  logic [35:0] ram_wdata, ram_rdata;
  int checks = 0, failures = 0;

  vme_slave dut (.clk, .rst_n, .as_n, .ds_n, .write_n, .lword_n, .iack_n, .am, .a,
    .d_in(d_m), .d_out, .d_oe, .dtack_n, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata, .blt_beat);

  vme_master_bfm bfm (.as_n, .ds_n, .write_n, .lword_n, .iack_n, .iackin_n, .am, .a,
    .d(d_m), .d_in(d_oe ? d_out : 32'hDEAD_BEEF), .dtack_n);

  always #5 clk = ~clk;

  logic [31:0] regs [64];
  logic [35:0] ram [int];
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) begin
    if (reg_wr) regs[reg_addr] <= reg_wdata;
    if (ram_en && ram_we) ram[int'(ram_addr)] = ram_wdata;
    if (ram_en) ram_rdata <= ram.exists(int'(ram_addr)) ? ram[int'(ram_addr)] : 36'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    logic [31:0] v, exp_words [64];
    for (int i = 0; i < 64; i++) regs[i] = 32'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // registers
    for (int i = 0; i < 8; i++) begin
      bfm.write32(6'h29, 32'h0000_C000 + 4 * i, 32'hA5A5_0000 + 32'(i), ok);
      check(ok, "A16 write acknowledged");
    end
    for (int i = 0; i < 8; i++) begin
      bfm.read32(6'h2D, 32'h0000_C000 + 4 * i, v, ok);
      check(ok && v == 32'hA5A5_0000 + 32'(i), $sformatf("A16 read reg %0d = %h", i, v));
    end
    bfm.read32(6'h29, 32'h0000_C000 + 4 * 20, v, ok);
    check(ok && v == 32'd20, "A16 read of an untouched register");
    // RAM single cycles
    for (int i = 0; i < 16; i++) begin
      exp_words[i] = $urandom;
      bfm.write32(6'h09, 32'h0800_0000 + 32'(4 * (1000 + i)), exp_words[i], ok);
      check(ok, "A32 write acknowledged");
    end
    for (int i = 0; i < 16; i++) begin
      bfm.read32(6'h0D, 32'h0800_0000 + 32'(4 * (1000 + i)), v, ok);
      check(ok && v == exp_words[i], $sformatf("A32 read %0d = %h exp %h", i, v, exp_words[i]));
      check(ram[1000 + i][35:32] == 4'd0, "VME write clears the top bits");
    end
    // last word of the 2 MB window
    bfm.write32(6'h09, 32'h081F_FFFC, 32'h1234_5678, ok);
    check(ok && ram[524287][31:0] == 32'h1234_5678, "last RAM word");
    // block transfer
    for (int i = 0; i < 64; i++) ram[5000 + i] = {4'hF, 32'hC0DE_0000 + 32'(i)};
    bfm.blt_read(32'h0800_0000 + 32'(4 * 5000), 64, ok);
    check(ok, "BLT acknowledged");
    check(bfm.rdbuf.size() == 64, "BLT word count");
    for (int i = 0; i < 64 && i < bfm.rdbuf.size(); i++)
      check(bfm.rdbuf[i] == 32'hC0DE_0000 + 32'(i), $sformatf("BLT word %0d = %h", i, bfm.rdbuf[i]));
    // cycles that must be ignored
    bfm.read32(6'h29, 32'h0000_D000, v, ok);
    check(!ok, "other A16 address ignored");
    bfm.read32(6'h39, 32'h0800_0000, v, ok);
    check(!ok, "A24 modifier ignored");
    bfm.read32(6'h09, 32'h0900_0000, v, ok);
    check(!ok, "other A32 address ignored");
    bfm.lword_n = 1;
    begin
      logic [7:0] vec;
      bfm.iack_cycle(3'd3, vec, ok);
      check(!ok, "interrupt acknowledge not answered by the slave");
    end
    // still working afterwards
    bfm.read32(6'h29, 32'h0000_C004, v, ok);
    check(ok && v == 32'hA5A5_0001, "slave recovers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
