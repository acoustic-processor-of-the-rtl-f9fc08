// VMEbus interrupter (release on acknowledge).
//
// A pulse on irq_req makes the interrupt pending and pulls the IRQ line of
// the programmed level (irq_n[level] = 0). The handler answers with an
// interrupt-acknowledge cycle that carries the level on A3..A1 and travels
// down the IACKIN/IACKOUT daisy chain. When IACKIN arrives with AS low, the
// interrupter either claims the cycle (pending and level match): it waits
// for DS0, drives the 8-bit status/ID on d_out[7:0], pulls DTACK, and
// clears the pending request; or it passes the acknowledge on by pulling
// IACKOUT until IACKIN is released. Inputs are synchronised by two
// flip-flops. The document states only that the board signals ready data by
// a VME interrupt; the level, the status/ID value, D08(O) status and the
// release-on-acknowledge behaviour are choices of this design.
module vme_interrupter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq_req,
  input  logic [2:0]  level,      // 1..7; 0 disables the request
  input  logic [7:0]  vector,     // status/ID returned in the acknowledge
  // VMEbus (active low)
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        iackin_n,
  input  logic [3:1]  a,
  output logic [7:1]  irq_n,
  output logic        iackout_n,
  output logic [7:0]  d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        pending
);

  typedef enum logic [2:0] {I_IDLE, I_CLAIM, I_ACK, I_PASS, I_END} istate_e;
  istate_e state;

  logic [1:0] as_sync, ds_sync, ia_sync;
  logic as_l, ds_l, ia_l;
  assign as_l = !as_sync[1];
  assign ds_l = !ds_sync[1];
  assign ia_l = !ia_sync[1];

  always_comb begin
    irq_n = '1;
    if (pending && level != 3'd0) irq_n[level] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= '1; ds_sync <= '1; ia_sync <= '1;
    end else begin
      as_sync <= {as_sync[0], as_n};
      ds_sync <= {ds_sync[0], ds0_n};
      ia_sync <= {ia_sync[0], iackin_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE; pending <= 1'b0; iackout_n <= 1'b1;
      d_out <= '0; d_oe <= 1'b0; dtack_n <= 1'b1;
    end else begin
      if (irq_req && level != 3'd0) pending <= 1'b1;
      unique case (state)
        I_IDLE: if (ia_l && as_l) begin
          if (pending && a == level) state <= I_CLAIM;
          else begin
            iackout_n <= 1'b0;
            state     <= I_PASS;
          end
        end
        I_CLAIM: begin
          if (!as_l) state <= I_IDLE;
          else if (ds_l) begin
            d_out   <= vector;
            d_oe    <= 1'b1;
            dtack_n <= 1'b0;
            pending <= 1'b0;
            state   <= I_ACK;
          end
        end
        I_ACK: if (!ds_l) begin
          d_oe    <= 1'b0;
          dtack_n <= 1'b1;
          state   <= I_END;
        end
        I_END: if (!as_l) state <= I_IDLE;      // wait for the end of the cycle
        I_PASS: if (!ia_l) begin
          iackout_n <= 1'b1;
          state     <= I_IDLE;
        end
        default: state <= I_IDLE;
      endcase
    end
  end

endmodule
