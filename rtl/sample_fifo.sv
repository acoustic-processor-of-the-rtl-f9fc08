// FIFO between the A/D converter card and the processing side.
//
// A single-clock first-in first-out buffer of DEPTH words of W bits, held in
// a memory array. A write when full is dropped and sets the sticky
// `overflow` flag, which `clear` resets together with the contents. Reads
// are first-word-fall-through: rd_data shows the oldest word while !empty
// and rd_en removes it. The document places a FIFO on the DSP board and
// gives its write time (6 ns); its depth and a common clock for both sides
// are choices of this design.
module sample_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty || clear);

endmodule
