// Conversion timing of the multichannel A/D converter card.
//
// All converters share one converter clock (CLK, here `sclk`) and one
// start-of-conversion strobe (STC), so every channel is sampled at the same
// instant; the beamformer relies on that phase relation. A conversion is
// started every TICK_CYCLES system clocks (576 cycles = 5.76 us at 100 MHz,
// i.e. fs = 173.6 kHz, four times the carrier). A phase counter runs
// 0..5 over six conversions: conversions 0/1 take the quadrature pair of the
// first channel of each three-channel group, 2/3 of the second, 4/5 of the
// third.
//
// Within one conversion (cnt counts system clocks, DIV = SCLK_DIV):
//   sclk   free-running, high during the first half of every DIV cycles;
//   stc    high from the falling edge of sclk period 0 to the falling edge of
//          period 1, so the converter sees it on the rising edge of period 1;
//   after CONV_SCLKS further periods the converter shifts its word out MSB
//   first on falling edges; bit_strobe marks the cycle right after each of
//   the SAMPLE_W rising edges on which the receiver should sample;
//   word_done pulses one cycle after the last bit strobe.
// The shared CLK/STC and fs come from the document; the serial clock ratio,
// the conversion latency and the exact strobe placement are choices of this
// design (the document names the SPI link but not its timing).
module madc_timing #(
  parameter int unsigned TICK_CYCLES = 576,
  parameter int unsigned SCLK_DIV    = 4,
  parameter int unsigned CONV_SCLKS  = 2,
  parameter int unsigned SAMPLE_W    = 14,
  parameter int unsigned PHASES      = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,        // sampling enabled
  output logic       sclk,       // common converter clock (CLK)
  output logic       stc,        // common start of conversion (STC)
  output logic       tick,       // first cycle of each conversion period
  output logic       bit_strobe, // sample the serial data lines now
  output logic       word_done,  // all SAMPLE_W bits received
  output logic [2:0] phase       // 0..PHASES-1, position in the I/Q sequence
);

  localparam int unsigned HALF      = SCLK_DIV / 2;
  localparam int unsigned FIRST_BIT = SCLK_DIV * (CONV_SCLKS + 2); // cnt of first sampling rise
  localparam int unsigned LAST_BIT  = FIRST_BIT + SCLK_DIV * (SAMPLE_W - 1);
  localparam int unsigned CNT_W     = $clog2(TICK_CYCLES);

  // A word plus the 36-cycle register transfer must fit in one period.
  initial begin
    if (SCLK_DIV < 4 || SCLK_DIV % 2 != 0)
      $error("SCLK_DIV must be even and at least 4");
    if (LAST_BIT + 2 + 40 >= TICK_CYCLES)
      $error("conversion period too short for the serial read-out");
  end

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      phase <= '0;
    end else if (!run) begin
      cnt   <= '0;
      phase <= '0;
    end else if (cnt == CNT_W'(TICK_CYCLES - 1)) begin
      cnt   <= '0;
      phase <= (phase == 3'(PHASES - 1)) ? 3'd0 : phase + 3'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  logic [CNT_W-1:0] w;
  assign w = CNT_W'(cnt % SCLK_DIV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk       <= 1'b0;
      stc        <= 1'b0;
      tick       <= 1'b0;
      bit_strobe <= 1'b0;
      word_done  <= 1'b0;
    end else begin
      sclk       <= (w < CNT_W'(HALF));
      stc        <= run && (cnt >= CNT_W'(HALF)) && (cnt < CNT_W'(SCLK_DIV + HALF));
      tick       <= run && (cnt == '0);
      bit_strobe <= run && (cnt >= CNT_W'(FIRST_BIT)) && (cnt <= CNT_W'(LAST_BIT)) && (w == '0);
      word_done  <= run && (cnt == CNT_W'(LAST_BIT + 1));
    end
  end

endmodule
