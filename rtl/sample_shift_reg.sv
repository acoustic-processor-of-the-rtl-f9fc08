// Serial-parallel sample register of the A/D converter card.
//
// One stage per channel (stage 0 = channel 1). Each stage holds a 14-bit
// sample and a one-bit ID marker. While a conversion is read out, every stage
// shifts in the serial data line of its own converter, MSB first, on
// bit_strobe. On load_done the ID markers are loaded from `mark` (set for the
// samples that matter in this conversion) and the register then moves as one
// chain towards stage 0, one position per clock (stage k takes stage k+1,
// the last stage takes zeros). Whatever leaves stage 0 with its ID set is
// written to the FIFO (fifo_we, fifo_wdata); unmarked samples are dropped.
// A full pass takes exactly N cycles (36 here), after which busy falls.
// The structure (per-channel serial stages, ID marker, shifting towards
// channel 1, only marked samples written) follows the document; one shift
// per clock and the port names are choices of this design.
module sample_shift_reg #(
  parameter int unsigned N = 36,
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,       // abandon a transfer, clear markers
  input  logic [N-1:0]        sdo,         // serial data line of each converter
  input  logic                bit_strobe,  // shift one serial bit into every stage
  input  logic                load_done,   // word complete: load markers, start transfer
  input  logic [N-1:0]        mark,        // ID marker of every channel for this conversion
  output logic                busy,        // transfer towards the FIFO in progress
  output logic                fifo_we,
  output logic signed [W-1:0] fifo_wdata
);

  logic [W-1:0] data [N];
  logic [N-1:0] id;
  logic [$clog2(N+1)-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id   <= '0;
      busy <= 1'b0;
      left <= '0;
      for (int k = 0; k < N; k++) data[k] <= '0;
    end else if (clear) begin
      id   <= '0;
      busy <= 1'b0;
      left <= '0;
    end else if (busy) begin
      for (int k = 0; k < N - 1; k++) data[k] <= data[k+1];
      data[N-1] <= '0;
      id        <= {1'b0, id[N-1:1]};
      left      <= left - 1'b1;
      busy      <= (left != 1);
    end else if (load_done) begin
      id   <= mark;
      busy <= 1'b1;
      left <= N[$clog2(N+1)-1:0];
    end else if (bit_strobe) begin
      for (int k = 0; k < N; k++) data[k] <= {data[k][W-2:0], sdo[k]};
    end
  end

  assign fifo_we    = busy && id[0];
  assign fifo_wdata = data[0];

endmodule
