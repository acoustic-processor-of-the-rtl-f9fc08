// VMEbus slave of the processing board.
//
// Answers two address windows with 32-bit data transfers (D32):
//   A16/D32, address modifiers 0x29/0x2D, 256-byte window at A16_BASE:
//     the board's general registers (64 words, register bus to meas_ctrl);
//   A32/D32, modifiers 0x09/0x0D (single) and 0x0B/0x0F (block transfer,
//     BLT), 2 MB window at A32_BASE: the 512K-word dual-port RAM, word n at
//     byte offset 4n (bits 31:0 of the 36-bit word; VME writes clear 35:32).
// In a BLT cycle the address is given once and the word address advances
// after every data strobe while AS stays low, so a master can fetch a whole
// measurement as one continuous block.
//
// Bus signals are active low and asynchronous; AS and the data strobes pass
// two synchronising flip-flops, and address, modifier, LWORD, WRITE and data
// are sampled once the synchronised strobe is seen (the bus guarantees they
// are stable by then). The slave drives d_out with d_oe and pulls DTACK
// (dtack_n = 0) until both data strobes are released. Accesses other than
// D32 (LWORD high, A1 set or one strobe only) and interrupt-acknowledge
// cycles are not answered.
//
// The windows, D32 only, and the BLT transfer come from the document (A16/D32
// registers, A32/D32 dual-port RAM, BLT of ANSI/VITA 1-1987); the base
// addresses, window sizes and the synchronous implementation are choices of
// this design.
module vme_slave #(
  parameter logic [15:0] A16_BASE = 16'hC000,
  parameter logic [31:0] A32_BASE = 32'h0800_0000,
  parameter int unsigned AW       = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  // VMEbus (active low)
  input  logic          as_n,
  input  logic [1:0]    ds_n,
  input  logic          write_n,
  input  logic          lword_n,
  input  logic          iack_n,
  input  logic [5:0]    am,
  input  logic [31:1]   a,
  input  logic [31:0]   d_in,
  output logic [31:0]   d_out,
  output logic          d_oe,
  output logic          dtack_n,
  // general registers
  output logic          reg_wr,
  output logic [5:0]    reg_addr,
  output logic [31:0]   reg_wdata,
  input  logic [31:0]   reg_rdata,
  // dual-port RAM, port B
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [35:0]   ram_wdata,
  input  logic [35:0]   ram_rdata,
  // activity
  output logic          blt_beat      // one data beat of a block transfer done
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_DS, S_RAM_RD, S_ACK, S_WAIT_AS} state_e;
  state_e state;

  logic [1:0] as_sync, ds0_sync, ds1_sync;
  logic       as_l, ds_l, ds_h;
  assign as_l = !as_sync[1];
  assign ds_l = !ds0_sync[1] && !ds1_sync[1];
  assign ds_h = ds0_sync[1] && ds1_sync[1];

  logic        sel_reg, blt, wr;
  logic [31:1] addr;
  logic        hit_a16, hit_a32, am_blt;

  always_comb begin
    hit_a16 = (am == 6'h29 || am == 6'h2D) && a[15:8] == A16_BASE[15:8];
    am_blt  = (am == 6'h0B || am == 6'h0F);
    hit_a32 = (am == 6'h09 || am == 6'h0D || am_blt) && a[31:21] == A32_BASE[31:21];
  end

  assign reg_addr  = addr[7:2];
  assign ram_addr  = addr[AW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= '1; ds0_sync <= '1; ds1_sync <= '1;
    end else begin
      as_sync  <= {as_sync[0], as_n};
      ds0_sync <= {ds0_sync[0], ds_n[0]};
      ds1_sync <= {ds1_sync[0], ds_n[1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; sel_reg <= 1'b0; blt <= 1'b0; wr <= 1'b0; addr <= '0;
      d_out <= '0; d_oe <= 1'b0; dtack_n <= 1'b1;
      reg_wr <= 1'b0; reg_wdata <= '0; ram_en <= 1'b0; ram_we <= 1'b0; ram_wdata <= '0;
      blt_beat <= 1'b0;
    end else begin
      reg_wr   <= 1'b0;
      ram_en   <= 1'b0;
      ram_we   <= 1'b0;
      blt_beat <= 1'b0;
      unique case (state)
        S_IDLE: if (as_l) begin
          addr    <= a;
          sel_reg <= hit_a16;
          blt     <= hit_a32 && am_blt;
          state   <= (iack_n && (hit_a16 || hit_a32)) ? S_WAIT_DS : S_WAIT_AS;
        end
        S_WAIT_DS: begin
          if (!as_l) state <= S_IDLE;
          else if (ds_l) begin
            if (lword_n || addr[1]) begin
              state <= S_WAIT_AS;                 // not a D32 access
            end else if (!write_n) begin
              wr <= 1'b1;
              if (sel_reg) begin
                reg_wr <= 1'b1; reg_wdata <= d_in;
              end else begin
                ram_en <= 1'b1; ram_we <= 1'b1; ram_wdata <= {4'd0, d_in};
              end
              dtack_n <= 1'b0;
              state   <= S_ACK;
            end else begin
              wr <= 1'b0;
              if (sel_reg) begin
                d_out   <= reg_rdata;
                d_oe    <= 1'b1;
                dtack_n <= 1'b0;
                state   <= S_ACK;
              end else begin
                ram_en <= 1'b1;
                state  <= S_RAM_RD;
              end
            end
          end
        end
        S_RAM_RD: state <= S_ACK;                 // RAM read latency
        S_ACK: begin
          if (!sel_reg && !wr && dtack_n) begin   // data from the RAM is here
            d_out   <= ram_rdata[31:0];
            d_oe    <= 1'b1;
            dtack_n <= 1'b0;
          end else if (ds_h) begin
            dtack_n <= 1'b1;
            d_oe    <= 1'b0;
            if (blt) begin
              addr     <= addr + 31'd2;            // next 32-bit word
              blt_beat <= 1'b1;
              state    <= S_WAIT_DS;
            end else begin
              state <= S_WAIT_AS;
            end
          end
        end
        S_WAIT_AS: if (!as_l) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
