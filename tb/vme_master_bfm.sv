// VMEbus master model for the testbenches (simulation only): single D32
// reads and writes, D32 block-transfer reads and interrupt-acknowledge
// cycles, with the strobes and timing of a slow asynchronous master. Every
// cycle waits for DTACK up to a timeout and reports `ok`.
module vme_master_bfm (
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        lword_n,
  output logic        iack_n,
  output logic        iackin_n,
  output logic [5:0]  am,
  output logic [31:1] a,
  output logic [31:0] d,
  input  logic [31:0] d_in,
  input  logic        dtack_n
);
  logic [31:0] rdbuf [$];
  int beats = 0;

  initial begin
    as_n = 1; ds_n = 2'b11; write_n = 1; lword_n = 1; iack_n = 1; iackin_n = 1;
    am = '0; a = '0; d = '0;
  end

  task automatic wait_dtack(input logic level, output bit ok);
    ok = 0;
    for (int i = 0; i < 400; i++) begin
      if (dtack_n == level) begin ok = 1; break; end
      #10;
    end
  endtask

  task automatic write32(input logic [5:0] mod, input logic [31:0] addr, input logic [31:0] data, output bit ok);
    bit ok2;
    am = mod; a = addr[31:1]; lword_n = 0; write_n = 0; iack_n = 1; d = data;
    #30 as_n = 0;
    #20 ds_n = 2'b00;
    wait_dtack(1'b0, ok);
    #15 ds_n = 2'b11;
    wait_dtack(1'b1, ok2);
    as_n = 1; write_n = 1;
    #30;
  endtask

  task automatic read32(input logic [5:0] mod, input logic [31:0] addr, output logic [31:0] data, output bit ok);
    bit ok2;
    am = mod; a = addr[31:1]; lword_n = 0; write_n = 1; iack_n = 1;
    #30 as_n = 0;
    #20 ds_n = 2'b00;
    wait_dtack(1'b0, ok);
    #15 data = d_in;
    ds_n = 2'b11;
    wait_dtack(1'b1, ok2);
    as_n = 1;
    #30;
  endtask

  // block transfer read of n words from addr; the words land in rdbuf
  task automatic blt_read(input logic [31:0] addr, input int n, output bit ok);
    bit ok1, ok2;
    ok = 1;
    am = 6'h0B; a = addr[31:1]; lword_n = 0; write_n = 1; iack_n = 1;
    #30 as_n = 0;
    for (int i = 0; i < n; i++) begin
      #20 ds_n = 2'b00;
      wait_dtack(1'b0, ok1);
      #15 rdbuf.push_back(d_in);
      ds_n = 2'b11;
      wait_dtack(1'b1, ok2);
      ok &= ok1 & ok2;
      beats++;
    end
    as_n = 1;
    #30;
  endtask

  // interrupt acknowledge for `level`; returns the 8-bit status/ID
  task automatic iack_cycle(input logic [2:0] level, output logic [7:0] vec, output bit ok);
    bit ok2;
    am = 6'h29; a = '0; a[3:1] = level; lword_n = 1; write_n = 1; iack_n = 0;
    #30 as_n = 0;
    #10 iackin_n = 0;
    #20 ds_n = 2'b10;
    wait_dtack(1'b0, ok);
    #15 vec = d_in[7:0];
    ds_n = 2'b11;
    wait_dtack(1'b1, ok2);
    as_n = 1; iackin_n = 1; iack_n = 1;
    #30;
  endtask
endmodule
