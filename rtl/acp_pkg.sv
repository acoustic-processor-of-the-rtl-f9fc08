// Shared constants and types of the acoustic processor.
//
// The sampling scheme follows the document: 36 channels in use, 14-bit
// samples, a common sampling rate of four times the carrier
// (fs = 173.6 kHz, one conversion every 5.76 us), quadrature pairs taken from
// one channel of each three-channel group in turn, so each channel gets an
// I/Q pair every six conversions. The beamformer pads the 36 channel samples
// to 128 spatial points and keeps 61 spectral lines (beams) over 60 degrees.
// The 100 MHz system clock, the 16-bit FIFO word and the 32-bit beam words
// are choices of this design.
package acp_pkg;

  localparam int unsigned CLK_HZ      = 100_000_000; // system clock (chosen)
  localparam int unsigned N_CH        = 36;          // channels in use
  localparam int unsigned N_ADC       = 40;          // channels on the card
  localparam int unsigned SAMPLE_W    = 14;          // ADC resolution
  localparam int unsigned GROUPS      = 12;          // three-channel groups
  localparam int unsigned PHASES      = 6;           // conversions per I/Q cycle of all groups
  localparam int unsigned TICK_CYCLES = 576;         // 5.76 us at 100 MHz
  localparam int unsigned FIFO_W      = 16;          // FIFO word: sign-extended sample
  localparam int unsigned DFT_N       = 128;         // zero-padded spatial DFT length
  localparam int unsigned N_BEAMS     = 61;          // beams over the 60 degree sector
  localparam int unsigned BEAM_W      = 32;          // beam sample width
  localparam int unsigned RAM_AW      = 19;          // 512K words
  localparam int unsigned RAM_DW      = 36;          // word width of the dual-port RAM
  localparam int unsigned N_RANGES    = 5;           // 100, 200, 400, 800, 1600 m
  localparam int unsigned N_PULSES    = 3;           // 4, 10, 20 ms sounding pulses

  // Sounding pulse setting: selects the low-pass and anti-reverberation
  // high-pass cut-offs.
  typedef enum logic [1:0] {
    PULSE_4MS  = 2'd0,
    PULSE_10MS = 2'd1,
    PULSE_20MS = 2'd2
  } pulse_e;

  // One beamformed (or filtered) complex sample of one beam.
  typedef struct packed {
    logic [5:0]                beam;
    logic signed [BEAM_W-1:0]  re;
    logic signed [BEAM_W-1:0]  im;
  } beam_sample_t;

  // General register map of the A16 window (word addresses).
  localparam logic [5:0] REG_CTRL    = 6'h00; // [0] start (self-clearing), [1] auto repeat, [2] stop
  localparam logic [5:0] REG_RANGE   = 6'h01; // range code 0..4
  localparam logic [5:0] REG_PULSE   = 6'h02; // pulse code 0..2
  localparam logic [5:0] REG_STATUS  = 6'h03; // [0] busy, [1] done, [2] FIFO overflow, [3] beamformer overrun
  localparam logic [5:0] REG_CELLS   = 6'h04; // cells written in the last measurement
  localparam logic [5:0] REG_IRQVEC  = 6'h05; // [7:0] status/ID, [10:8] IRQ level
  localparam logic [5:0] REG_PINGS   = 6'h06; // completed measurements
  localparam logic [5:0] REG_ID      = 6'h07; // board identification constant

endpackage
