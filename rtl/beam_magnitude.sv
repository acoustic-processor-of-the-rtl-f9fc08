// Beam amplitude: square root of the sum of squares of the sine and cosine
// components of a filtered beam sample.
//
// The document takes the root of the sum of squares as the beam pattern
// value; this design computes it as a 32-bit integer square root of the
// 64-bit sum re^2 + im^2, one result bit per clock (restoring, MSB first),
// so out_valid rises 32 clocks after the edge that takes in_valid. The result is the floor of
// the exact root. in_valid must not arrive while busy (one beam per 36
// clocks arrives from the beamformer, so it never does in this design).
module beam_magnitude (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  acp_pkg::beam_sample_t in,
  output logic                  busy,
  output logic                  out_valid,
  output logic [5:0]            out_beam,
  output logic [31:0]           out_mag
);

  logic [63:0] v;
  logic [31:0] root;
  logic [5:0]  bitpos;
  logic [5:0]  beam;
  logic [31:0] trial;
  logic [63:0] trial_sq;

  logic signed [63:0] re64, im64;
  assign re64 = 64'(signed'(in.re));
  assign im64 = 64'(signed'(in.im));

  assign trial    = root | (32'd1 << bitpos[4:0]);
  assign trial_sq = 64'(trial) * 64'(trial);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; v <= '0; root <= '0; bitpos <= '0; beam <= '0;
      out_valid <= 1'b0; out_beam <= '0; out_mag <= '0;
    end else if (clear) begin
      busy <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        if (trial_sq <= v) root <= trial;
        if (bitpos == 6'd0) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_beam  <= beam;
          out_mag   <= (trial_sq <= v) ? trial : root;
        end else begin
          bitpos <= bitpos - 1'b1;
        end
      end else if (in_valid) begin
        busy   <= 1'b1;
        root   <= '0;
        bitpos <= 6'd31;
        beam   <= in.beam;
        v      <= 64'(re64 * re64) + 64'(im64 * im64);
      end
    end
  end

endmodule
