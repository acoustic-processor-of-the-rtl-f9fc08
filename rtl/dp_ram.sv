// Dual-port data buffer, 512K words of 36 bits.
//
// Holds the processed results of one measurement so that the visualisation
// computers can fetch them over VME as one continuous block while the
// processing side owns the other port. Two independent synchronous ports,
// each with enable, write enable, address, write data and read data one
// clock after the enable (the old contents on a simultaneous read and
// write of the same port). If both ports write one address in the same
// clock, port A's value is kept. Size and word width follow the document;
// the synchronous single-clock interface is a choice of this design.
module dp_ram #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 36
) (
  input  logic          clk,
  // port A: processing side
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: VME side
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
