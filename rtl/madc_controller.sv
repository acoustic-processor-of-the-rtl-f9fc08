// Controller of the multichannel A/D converter card (the card's FPGA).
//
// Drives the common converter clock and start-of-conversion strobe
// (madc_timing), receives the 14-bit word of every channel over its own
// serial line into the serial-parallel register (sample_shift_reg), and
// marks the samples to keep: in phase p (0..5) of the six-conversion cycle,
// channel c (0-based) is kept when c mod 3 == p / 2, so each conversion keeps
// one channel of each of the 12 three-channel groups and every channel gets
// two samples a quarter carrier period apart (an I/Q pair) every six
// conversions. The kept samples (12 per conversion) reach the FIFO as
// sign-extended 16-bit words, channel order ascending.
//
// Only N_CH converters are read; the card carries 40, of which the document's
// processor uses 36. The grouping of consecutive channels into groups, the
// two's complement sample format and the 16-bit FIFO word are choices of this
// design. `run` starts the sequence at phase 0 and stopping it clears it.
module madc_controller #(
  parameter int unsigned N_CH        = 36,
  parameter int unsigned SAMPLE_W    = 14,
  parameter int unsigned FIFO_W      = 16,
  parameter int unsigned TICK_CYCLES = 576,
  parameter int unsigned SCLK_DIV    = 4,
  parameter int unsigned CONV_SCLKS  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [N_CH-1:0]   sdo,        // serial data of each converter
  output logic              sclk,       // CLK to all converters
  output logic              stc,        // STC to all converters
  output logic              tick,       // start of each conversion period
  output logic [2:0]        phase,
  output logic              fifo_we,
  output logic [FIFO_W-1:0] fifo_wdata
);

  logic bit_strobe, word_done, busy;
  logic [N_CH-1:0] mark;
  logic signed [SAMPLE_W-1:0] sample;

  madc_timing #(
    .TICK_CYCLES(TICK_CYCLES), .SCLK_DIV(SCLK_DIV), .CONV_SCLKS(CONV_SCLKS),
    .SAMPLE_W(SAMPLE_W), .PHASES(6)
  ) u_timing (
    .clk, .rst_n, .run, .sclk, .stc, .tick, .bit_strobe, .word_done, .phase
  );

  always_comb begin
    for (int c = 0; c < N_CH; c++)
      mark[c] = ((c % 3) == int'(phase) / 2);
  end

  sample_shift_reg #(.N(N_CH), .W(SAMPLE_W)) u_sreg (
    .clk, .rst_n,
    .clear      (!run),
    .sdo,
    .bit_strobe,
    .load_done  (word_done),
    .mark,
    .busy,
    .fifo_we,
    .fifo_wdata (sample)
  );

  assign fifo_wdata = FIFO_W'(sample);

  // The transfer of one conversion must end before the next word arrives.
  property p_transfer_in_time;
    @(posedge clk) disable iff (!rst_n) word_done |-> !busy;
  endproperty
  a_transfer_in_time: assert property (p_transfer_in_time);

endmodule
