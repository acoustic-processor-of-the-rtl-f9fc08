// Acoustic processor of a mine-countermeasure sonar: from the serial words of
// 36 array-channel A/D converters to beam amplitudes that visualisation
// computers fetch over VME.
//
// Chain (all in one 100 MHz clock domain):
//   madc_controller  drives the common converter clock and start strobe,
//                    reads 36 serial words per conversion (fs = 173.6 kHz)
//                    and forwards the 12 marked quadrature samples of each
//                    conversion;
//   sample_fifo      decouples the converter card from the processing side;
//   beamformer       weighted spatial DFT, 61 beams per cell (one cell =
//                    one I/Q pair of every channel, every 34.56 us);
//   beam_filter      per-beam Butterworth low-pass and high-pass filters
//                    chosen by the sounding pulse length;
//   beam_magnitude   root of the sum of squares of each beam sample;
//   meas_ctrl        measurement cycle, general registers, result storage;
//   dp_ram           512K x 36 result buffer (port A processing, port B VME);
//   vme_slave        A16/D32 registers, A32/D32 and BLT access to the RAM;
//   vme_interrupter  tells the computers that a measurement is ready.
// The A/D card link, the FIFO, the dual-port buffer and the VME slave and
// interrupter follow the document's board structure. The document runs the
// beamforming and filtering as software on a DSP processor; here they are
// hardware blocks in its place, a choice of this design.
//
// Ports: the converter card signals (adc_*), the transmitter trigger, and
// the VMEbus signals with separate in/out/enable for the data lines; the
// slave's and the interrupter's data and DTACK drives are merged here.
// Some block outputs are left unconnected: tick, phase, f_full, bf_busy,
// blt_beat and irq_pending are observation signals for testbenches, and the
// processing side only writes the dual-port RAM (ram_a_rdata is unread).
//
// Timing: each beam is computed in 36 clocks, then filtered (12 clocks) and
// reduced to an amplitude (32 clocks) while the next beams are computed, so
// a cell's 61 amplitudes are in the RAM well before the next cell, one cell
// every 34.56 us.
module acoustic_processor #(
  parameter int unsigned N_CH        = 36,
  parameter int unsigned TICK_CYCLES = 576,
  parameter int unsigned FIFO_DEPTH  = 1024,
  parameter int unsigned RAM_AW      = 19,
  parameter logic [4:0][31:0] CELLS  = {32'd62554, 32'd31277, 32'd15624, 32'd7812, 32'd3906},
  parameter logic [4:0][31:0] DECIM  = {32'd8, 32'd4, 32'd2, 32'd1, 32'd1},
  parameter logic [4:0][31:0] PERIOD = {32'd400_000_000, 32'd200_000_000, 32'd130_000_000,
                                        32'd80_000_000, 32'd60_000_000}
) (
  input  logic             clk,
  input  logic             rst_n,
  // A/D converter card
  output logic             adc_sclk,
  output logic             adc_stc,
  input  logic [N_CH-1:0]  adc_sdo,
  // transmitter
  output logic             tx_trigger,
  // VMEbus (active low)
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic             vme_lword_n,
  input  logic             vme_iack_n,
  input  logic             vme_iackin_n,
  input  logic [5:0]       vme_am,
  input  logic [31:1]      vme_a,
  input  logic [31:0]      vme_d_in,
  output logic [31:0]      vme_d_out,
  output logic             vme_d_oe,
  output logic             vme_dtack_n,
  output logic [7:1]       vme_irq_n,
  output logic             vme_iackout_n
);

  import acp_pkg::*;

  // converter card -> FIFO
  logic              acq_run, acq_clear, tick;
  logic [2:0]        phase;
  logic              f_we, f_rd, f_empty, f_full, f_ovf;
  logic [15:0]       f_wdata, f_rdata;

  madc_controller #(.N_CH(N_CH), .TICK_CYCLES(TICK_CYCLES)) u_madc (
    .clk, .rst_n, .run(acq_run), .sdo(adc_sdo), .sclk(adc_sclk), .stc(adc_stc),
    .tick, .phase, .fifo_we(f_we), .fifo_wdata(f_wdata)
  );

  sample_fifo #(.W(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(acq_clear), .wr_en(f_we), .wr_data(f_wdata),
    .rd_en(f_rd), .rd_data(f_rdata), .empty(f_empty), .full(f_full), .overflow(f_ovf)
  );

  // processing chain
  beam_sample_t bf_out, flt_out;
  logic         bf_valid, bf_busy, bf_ovr, flt_valid, flt_busy, mag_valid, mag_busy;
  logic [5:0]   mag_beam;
  logic [31:0]  mag;
  logic [1:0]   pulse;

  beamformer #(.N_CH(N_CH)) u_bf (
    .clk, .rst_n, .clear(acq_clear), .fifo_empty(f_empty), .fifo_data(f_rdata),
    .fifo_rd(f_rd), .out_valid(bf_valid), .out(bf_out), .busy(bf_busy), .overrun(bf_ovr)
  );

  beam_filter u_flt (
    .clk, .rst_n, .clear(acq_clear), .pulse, .in_valid(bf_valid), .in(bf_out),
    .busy(flt_busy), .out_valid(flt_valid), .out(flt_out)
  );

  beam_magnitude u_mag (
    .clk, .rst_n, .clear(acq_clear), .in_valid(flt_valid), .in(flt_out),
    .busy(mag_busy), .out_valid(mag_valid), .out_beam(mag_beam), .out_mag(mag)
  );

  // control, buffer and VME
  logic          reg_wr, irq_req, ram_a_we, ram_b_en, ram_b_we, blt_beat, irq_pending;
  logic [5:0]    reg_addr;
  logic [31:0]   reg_wdata, reg_rdata, s_d;
  logic [RAM_AW-1:0] ram_a_addr, ram_b_addr;
  logic [35:0]   ram_a_wdata, ram_a_rdata, ram_b_wdata, ram_b_rdata;
  logic [2:0]    irq_level;
  logic [7:0]    irq_vector, i_d;
  logic          s_oe, s_dtack_n, i_oe, i_dtack_n;

  meas_ctrl #(.AW(RAM_AW), .CELLS(CELLS), .DECIM(DECIM), .PERIOD(PERIOD)) u_ctrl (
    .clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .fifo_overflow(f_ovf), .bf_overrun(bf_ovr),
    .acq_run, .acq_clear, .tx_trigger, .pulse,
    .mag_valid, .mag_beam, .mag,
    .ram_we(ram_a_we), .ram_addr(ram_a_addr), .ram_wdata(ram_a_wdata),
    .irq_req, .irq_level, .irq_vector
  );

  dp_ram #(.AW(RAM_AW), .DW(36)) u_ram (
    .clk,
    .a_en(ram_a_we), .a_we(ram_a_we), .a_addr(ram_a_addr), .a_wdata(ram_a_wdata), .a_rdata(ram_a_rdata),
    .b_en(ram_b_en), .b_we(ram_b_we), .b_addr(ram_b_addr), .b_wdata(ram_b_wdata), .b_rdata(ram_b_rdata)
  );

  vme_slave #(.AW(RAM_AW)) u_slave (
    .clk, .rst_n, .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .lword_n(vme_lword_n), .iack_n(vme_iack_n), .am(vme_am), .a(vme_a), .d_in(vme_d_in),
    .d_out(s_d), .d_oe(s_oe), .dtack_n(s_dtack_n),
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .ram_en(ram_b_en), .ram_we(ram_b_we), .ram_addr(ram_b_addr), .ram_wdata(ram_b_wdata),
    .ram_rdata(ram_b_rdata), .blt_beat
  );

  vme_interrupter u_irq (
    .clk, .rst_n, .irq_req, .level(irq_level), .vector(irq_vector),
    .as_n(vme_as_n), .ds0_n(vme_ds_n[0]), .iackin_n(vme_iackin_n), .a(vme_a[3:1]),
    .irq_n(vme_irq_n), .iackout_n(vme_iackout_n), .d_out(i_d), .d_oe(i_oe),
    .dtack_n(i_dtack_n), .pending(irq_pending)
  );

  assign vme_d_oe    = s_oe | i_oe;
  assign vme_d_out   = s_oe ? s_d : {24'd0, i_d};
  assign vme_dtack_n = s_dtack_n & i_dtack_n;

  // The processing chain never receives a sample while a stage is busy.
  a_filter_free: assert property (@(posedge clk) disable iff (!rst_n) bf_valid |-> !flt_busy);
  a_mag_free:    assert property (@(posedge clk) disable iff (!rst_n) flt_valid |-> !mag_busy);

endmodule
