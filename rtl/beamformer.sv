// Spatial-DFT beamformer.
//
// Forms 61 beams over a 60 degree sector from the quadrature samples of the
// 36 array channels. The samples of one "cell" (one I/Q pair of every
// channel, 72 FIFO words) arrive in the order the A/D card writes them: six
// conversions of 12 words, conversion p holding channels 3g + p/2
// (g = 0..11), even p the first (I) and odd p the second (Q) sample of the
// pair. The middle channel of each group is sampled two conversions (half a
// carrier period at fs = 4 x carrier) after the first, so its samples are
// negated to restore a common phase reference; the third is a full period
// later and needs no correction. Likewise consecutive cells lie 1.5 carrier
// periods apart, so the carrier phase advances by 3 pi from cell to cell:
// every second cell (counted from `clear`) is negated as a whole, which
// brings the echo to base band. Every sample is multiplied by its channel's
// amplitude weight on arrival and stored in one of two banks; a full bank is
// transformed while the other fills.
//
// The transform is the 128-point spatial DFT of the 36 weighted samples
// padded with zeros, evaluated directly for the 61 lines m = -30..+30:
//   X[m] = sum_k w_k (I_k + jQ_k) exp(-j 2 pi k m / 128)
// with one complex multiply-accumulate per clock: 36 clocks per beam,
// 2196 clocks per cell, well inside the 3456 clocks (34.56 us at 100 MHz)
// between cells. Beam b = m + 30 leaves on out_valid once per 36 clocks,
// scaled by 2^-15. If a bank fills while the previous one is still being
// transformed, the new cell is dropped and `overrun` is set.
//
// The document gives the method (weighting, zero padding to 128, 61 beams
// in 60 degrees, root of the sum of squares afterwards) and runs it on a
// DSP processor as an FFT; this design computes only the 61 lines it keeps,
// in hardware. The weight taper (cosine on a 0.45 pedestal, about -18 dB
// side lobes), the sign correction, the choice of lines and all widths
// are choices of this design.
module beamformer #(
  parameter int unsigned N_CH    = 36,
  parameter int unsigned DFT_N   = 128,
  parameter int unsigned N_BEAMS = 61,
  parameter real         PEDESTAL = 0.45
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  // FIFO side (first-word-fall-through)
  input  logic               fifo_empty,
  input  logic [15:0]        fifo_data,
  output logic               fifo_rd,
  // beam output
  output logic               out_valid,
  output acp_pkg::beam_sample_t out,
  output logic               busy,
  output logic               overrun
);

  localparam int unsigned N_WORDS = 2 * N_CH;       // FIFO words per cell
  localparam int unsigned GRP     = N_CH / 3;       // words per conversion
  localparam int unsigned TW_W    = $clog2(DFT_N);
  localparam real         PI      = 3.14159265358979323846;

  typedef logic signed [15:0] tab_t [DFT_N];
  typedef logic signed [15:0] wtab_t [N_CH];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int i = 0; i < DFT_N; i++) t[i] = 16'($rtoi($floor($cos(2.0 * PI * i / DFT_N) * 32767.0 + 0.5)));
    return t;
  endfunction

  function automatic tab_t mk_sin();
    tab_t t;
    for (int i = 0; i < DFT_N; i++) t[i] = 16'($rtoi($floor($sin(2.0 * PI * i / DFT_N) * 32767.0 + 0.5)));
    return t;
  endfunction

  // w_k = p + (1 - p) cos(pi (k - (N-1)/2) / N), Q1.15
  function automatic wtab_t mk_wgt();
    wtab_t t;
    for (int k = 0; k < N_CH; k++)
      t[k] = 16'($rtoi($floor((PEDESTAL + (1.0 - PEDESTAL) *
                 $cos(PI * (k - (N_CH - 1) / 2.0) / N_CH)) * 32767.0 + 0.5)));
    return t;
  endfunction

  localparam tab_t  COS_T = mk_cos();
  localparam tab_t  SIN_T = mk_sin();
  localparam wtab_t WGT_T = mk_wgt();

  // ---------------------------------------------------------------- input
  logic signed [15:0] xi [2][N_CH];
  logic signed [15:0] xq [2][N_CH];
  logic               wbank;
  logic               cell_odd;
  logic [$clog2(N_WORDS)-1:0] widx;
  int unsigned        conv, grp, ch;
  logic signed [15:0] xin;
  logic signed [31:0] xw;

  assign fifo_rd = !fifo_empty && !clear;

  always_comb begin
    conv = int'(widx) / GRP;
    grp  = int'(widx) % GRP;
    ch   = 3 * grp + conv / 2;
    xin  = ((conv / 2 == 1) != cell_odd) ? -$signed(fifo_data) : $signed(fifo_data);
    xw   = (32'(xin) * 32'(WGT_T[ch])) >>> 15;
  end

  // ---------------------------------------------------------------- compute
  logic               cbank, running;
  logic [5:0]         beam;
  logic [$clog2(N_CH)-1:0] k;
  logic signed [47:0] acc_re, acc_im;
  logic [TW_W-1:0]    m7, tidx;
  logic signed [15:0] c, s, ci, cq;
  logic signed [47:0] t_re, t_im, n_re, n_im;

  always_comb begin
    m7   = TW_W'(int'(beam) - (N_BEAMS - 1) / 2);
    tidx = TW_W'(int'(k) * int'(m7));
    c    = COS_T[tidx];
    s    = SIN_T[tidx];
    ci   = xi[cbank][k];
    cq   = xq[cbank][k];
    t_re = 48'(ci) * 48'(c) + 48'(cq) * 48'(s);
    t_im = 48'(cq) * 48'(c) - 48'(ci) * 48'(s);
    n_re = (k == 0) ? t_re : acc_re + t_re;
    n_im = (k == 0) ? t_im : acc_im + t_im;
  end

  logic cell_full;
  assign cell_full = fifo_rd && (widx == $bits(widx)'(N_WORDS - 1));
  assign busy      = running;

  always_ff @(posedge clk) begin
    if (fifo_rd) begin
      if (conv % 2 == 0) xi[wbank][ch] <= xw[15:0];
      else               xq[wbank][ch] <= xw[15:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0; widx <= '0; cbank <= 1'b0; running <= 1'b0; cell_odd <= 1'b0;
      beam <= '0; k <= '0; acc_re <= '0; acc_im <= '0;
      out_valid <= 1'b0; out <= '0; overrun <= 1'b0;
    end else if (clear) begin
      wbank <= 1'b0; widx <= '0; running <= 1'b0; beam <= '0; k <= '0; cell_odd <= 1'b0;
      out_valid <= 1'b0; overrun <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (fifo_rd) widx <= cell_full ? '0 : widx + 1'b1;
      if (cell_full) begin
        cell_odd <= ~cell_odd;
        if (running) begin
          overrun <= 1'b1;                  // drop: refill the same bank
        end else begin
          cbank   <= wbank;
          wbank   <= ~wbank;
          running <= 1'b1;
          beam    <= '0;
          k       <= '0;
        end
      end
      if (running) begin
        acc_re <= n_re;
        acc_im <= n_im;
        if (k == $bits(k)'(N_CH - 1)) begin
          k         <= '0;
          out_valid <= 1'b1;
          out.beam  <= beam;
          out.re    <= acp_pkg::BEAM_W'(n_re >>> 15);
          out.im    <= acp_pkg::BEAM_W'(n_im >>> 15);
          if (beam == 6'(N_BEAMS - 1)) running <= 1'b0;
          else                         beam    <= beam + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
