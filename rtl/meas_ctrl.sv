// Measurement cycle controller and general registers.
//
// Runs one measurement ("ping"): on a start command (or, in auto mode, when
// the sounding repetition period T of the selected range has elapsed) it
// pulses acq_clear to empty the processing chain, pulses tx_trigger to start
// the sounding pulse, and enables sampling (acq_run). It then counts
// processed range cells (one cell = one amplitude for each of the 61 beams)
// and stores every DECIM-th cell in the dual-port RAM, beam by beam, as one
// continuous block from address 0. After the number of cells that covers
// the propagation time t_p of the range it stops sampling, sets `done` and
// pulses irq_req so the VME interrupter tells the visualisation computers
// that the block can be fetched.
//
// Ranges (table values of the document: range, T, t_p) and the cells and
// decimation this design uses at one cell per 34.56 us:
//   code 0  100 m  T 0.6 s  t_p 0.135 s   3906 cells, all stored
//   code 1  200 m  T 0.8 s  t_p 0.270 s   7812 cells, all stored
//   code 2  400 m  T 1.3 s  t_p 0.540 s  15624 cells, every 2nd stored
//   code 3  800 m  T 2 s    t_p 1.081 s  31277 cells, every 4th stored
//   code 4 1600 m  T 4 s    t_p 2.162 s  62554 cells, every 8th stored
// so the longest range still fits the 512K-word buffer (at most
// 7820 x 61 words). The decimation, the register map (acp_pkg REG_*) and the
// word layout {4'b0, 32-bit amplitude} are choices of this design; the
// document states only that the buffer holds the longest range.
//
// Register bus: reg_wr writes reg_wdata to reg_addr; reg_rdata is the
// combinational read of reg_addr.
module meas_ctrl #(
  parameter int unsigned N_BEAMS = 61,
  parameter int unsigned AW      = 19,
  parameter logic [4:0][31:0] CELLS  = {32'd62554, 32'd31277, 32'd15624, 32'd7812, 32'd3906},
  parameter logic [4:0][31:0] DECIM  = {32'd8, 32'd4, 32'd2, 32'd1, 32'd1},
  parameter logic [4:0][31:0] PERIOD = {32'd400_000_000, 32'd200_000_000, 32'd130_000_000,
                                        32'd80_000_000, 32'd60_000_000}
) (
  input  logic          clk,
  input  logic          rst_n,
  // general register bus
  input  logic          reg_wr,
  input  logic [5:0]    reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic [31:0]   reg_rdata,
  // status from the chain
  input  logic          fifo_overflow,
  input  logic          bf_overrun,
  // acquisition control
  output logic          acq_run,
  output logic          acq_clear,
  output logic          tx_trigger,
  output logic [1:0]    pulse,
  // amplitudes from the processing chain
  input  logic          mag_valid,
  input  logic [5:0]    mag_beam,
  input  logic [31:0]   mag,
  // dual-port RAM, port A (write only)
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [35:0]   ram_wdata,
  // interrupter
  output logic          irq_req,
  output logic [2:0]    irq_level,
  output logic [7:0]    irq_vector
);

  import acp_pkg::*;

  localparam logic [31:0] BOARD_ID = 32'h4D47_3839; // "MG89"

  logic        auto_mode, busy, done, start_cmd, stop_cmd, pending;
  logic [2:0]  range_r, range_q;
  logic [31:0] cell_cnt, cells_stored, pings, period_cnt, dcnt;
  logic [AW-1:0] waddr;

  assign start_cmd = reg_wr && reg_addr == REG_CTRL && reg_wdata[0];
  assign stop_cmd  = reg_wr && reg_addr == REG_CTRL && reg_wdata[2];

  always_comb begin
    unique case (reg_addr)
      REG_CTRL:   reg_rdata = {30'd0, auto_mode, 1'b0};
      REG_RANGE:  reg_rdata = {29'd0, range_r};
      REG_PULSE:  reg_rdata = {30'd0, pulse};
      REG_STATUS: reg_rdata = {28'd0, bf_overrun, fifo_overflow, done, busy};
      REG_CELLS:  reg_rdata = cells_stored;
      REG_IRQVEC: reg_rdata = {21'd0, irq_level, irq_vector};
      REG_PINGS:  reg_rdata = pings;
      REG_ID:     reg_rdata = BOARD_ID;
      default:    reg_rdata = 32'd0;
    endcase
  end

  logic last_cell, store;
  assign last_cell = mag_valid && mag_beam == 6'(N_BEAMS - 1) && cell_cnt == CELLS[range_q] - 1;
  assign store     = (dcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      auto_mode <= 1'b0; range_r <= '0; range_q <= '0; pulse <= 2'd0;
      irq_level <= 3'd3; irq_vector <= 8'h40;
      busy <= 1'b0; done <= 1'b0; pending <= 1'b0;
      cell_cnt <= '0; cells_stored <= '0; pings <= '0; period_cnt <= '0; dcnt <= '0;
      waddr <= '0; acq_run <= 1'b0; acq_clear <= 1'b0; tx_trigger <= 1'b0;
      ram_we <= 1'b0; ram_addr <= '0; ram_wdata <= '0; irq_req <= 1'b0;
    end else begin
      acq_clear  <= 1'b0;
      tx_trigger <= 1'b0;
      irq_req    <= 1'b0;
      ram_we     <= 1'b0;

      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL:   auto_mode <= reg_wdata[1];
          REG_RANGE:  if (!busy) range_r <= (reg_wdata[2:0] > 3'd4) ? 3'd4 : reg_wdata[2:0];
          REG_PULSE:  if (!busy) pulse <= (reg_wdata[1:0] > 2'd2) ? 2'd2 : reg_wdata[1:0];
          REG_IRQVEC: begin irq_vector <= reg_wdata[7:0]; irq_level <= reg_wdata[10:8]; end
          default: ;
        endcase
      end

      // repetition timer of auto mode, counted from each ping start
      if (period_cnt != 0) begin
        period_cnt <= period_cnt - 1;
        if (period_cnt == 1 && auto_mode) pending <= 1'b1;
      end else if (auto_mode) begin
        pending <= 1'b1;                    // first ping after auto is set
      end

      if (stop_cmd) begin
        busy <= 1'b0; acq_run <= 1'b0; pending <= 1'b0;
      end else if (!busy && (start_cmd || pending)) begin
        pending    <= 1'b0;
        busy       <= 1'b1;
        done       <= 1'b0;
        range_q    <= range_r;
        acq_clear  <= 1'b1;
        tx_trigger <= 1'b1;
        acq_run    <= 1'b1;
        cell_cnt       <= '0;
        dcnt       <= '0;
        waddr      <= '0;
        cells_stored <= '0;
        period_cnt <= PERIOD[range_r] - 1;
      end else if (busy && mag_valid) begin
        if (store) begin
          ram_we    <= 1'b1;
          ram_addr  <= waddr;
          ram_wdata <= {4'd0, mag};
          waddr     <= waddr + 1'b1;
        end
        if (mag_beam == 6'(N_BEAMS - 1)) begin
          cell_cnt <= cell_cnt + 1;
          dcnt <= (dcnt == DECIM[range_q] - 1) ? '0 : dcnt + 1;
          if (store) cells_stored <= cells_stored + 1;
          if (last_cell) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            acq_run <= 1'b0;
            irq_req <= 1'b1;
            pings   <= pings + 1;
          end
        end
      end
    end
  end

endmodule
