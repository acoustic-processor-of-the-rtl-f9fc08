// Per-beam low-pass and anti-reverberation high-pass filters.
//
// Every beam's sine and cosine components are filtered, as separate real
// signals, by an 8th-order Butterworth low-pass (four biquad sections) that
// improves the signal-to-noise ratio, followed by a 4th-order Butterworth
// high-pass (two sections) that strongly attenuates the very low frequencies
// of reverberation. Cut-offs follow the sounding pulse:
//   pulse 4 ms : low-pass 5 kHz, high-pass 100 Hz
//   pulse 10 ms: low-pass 2 kHz, high-pass  40 Hz
//   pulse 20 ms: low-pass 1 kHz, high-pass  20 Hz
// The filter order, type and cut-offs come from the document. The beam
// sample rate (fs / 6 = 28.93 kHz, one I/Q pair per channel every six
// conversions), the bilinear transform with pre-warping and the fixed-point
// formats are choices of this design.
//
// Coefficients are computed at elaboration: for a section with analogue
// pole pair s^2 + d s + 1, d = 2 cos(pi (2i+1) / (2N)), K = tan(pi fc / fs),
// n = 1 + dK + K^2, a1 = 2(K^2 - 1)/n, a2 = (1 - dK + K^2)/n, and
// b = K^2/n (1, 2, 1) for low-pass or 1/n (1, -2, 1) for high-pass. They are
// held with 30 fraction bits. Each section is a transposed direct form II:
//   y = b0 x + s1,  s1' = b1 x - a1 y + s2,  s2' = b2 x - a2 y
// with the states kept at full product precision. The signal between
// sections carries 16 fraction bits: the high-pass poles lie so close to
// z = 1 that a rounding error of one output LSB fed back through them would
// grow about two thousandfold; with the extra bits it stays far below one
// LSB. Inputs and outputs are 32-bit integers (the output rounded and
// saturated); the internal words are 96 bits wide.
//
// One section is evaluated per clock, time-shared over all beams: an input
// sample takes 12 clocks (6 sections x 2 components); the beamformer
// delivers one beam per 36 clocks. States live in a memory indexed by beam,
// component and section; `clear` (start of a measurement) marks every
// stream as fresh so that its states read as zero.
module beam_filter #(
  parameter int unsigned N_BEAMS = 61,
  parameter real         FS_HZ   = 173600.0 / 6.0,
  parameter real         LP_4MS  = 5000.0,
  parameter real         LP_10MS = 2000.0,
  parameter real         LP_20MS = 1000.0,
  parameter real         HP_4MS  = 100.0,
  parameter real         HP_10MS = 40.0,
  parameter real         HP_20MS = 20.0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [1:0]           pulse,      // acp_pkg::pulse_e
  input  logic                 in_valid,
  input  acp_pkg::beam_sample_t in,
  output logic                 busy,
  output logic                 out_valid,
  output acp_pkg::beam_sample_t out
);

  localparam int unsigned NSEC = 6;               // 4 low-pass + 2 high-pass
  localparam int unsigned NSTR = 2 * N_BEAMS;     // streams (beam, component)
  localparam int unsigned FRAC = 30;              // coefficient fraction bits
  localparam int unsigned XF   = 16;              // fraction bits of the signal between sections
  localparam real         PI   = 3.14159265358979323846;
  localparam int unsigned SW   = $clog2(NSTR * NSEC);

  // flattened [pulse][section][b0 b1 b2 a1 a2]
  typedef logic signed [31:0] coef_t [3 * NSEC * 5];

  function automatic logic signed [31:0] q30(input real v);
    return 32'($rtoi($floor(v * 1073741824.0 + 0.5)));
  endfunction

  function automatic coef_t mk_coef();
    coef_t t;
    real fc, kk, d, n;
    int  ord, i;
    for (int p = 0; p < 3; p++) begin
      for (int sec = 0; sec < NSEC; sec++) begin
        if (sec < 4) begin
          fc  = (p == 0) ? LP_4MS : (p == 1) ? LP_10MS : LP_20MS;
          ord = 8; i = sec;
        end else begin
          fc  = (p == 0) ? HP_4MS : (p == 1) ? HP_10MS : HP_20MS;
          ord = 4; i = sec - 4;
        end
        kk = $tan(PI * fc / FS_HZ);
        d  = 2.0 * $cos(PI * (2 * i + 1) / (2.0 * ord));
        n  = 1.0 + d * kk + kk * kk;
        if (sec < 4) begin
          t[(p * NSEC + sec) * 5 + 0] = q30(kk * kk / n);
          t[(p * NSEC + sec) * 5 + 1] = q30(2.0 * kk * kk / n);
          t[(p * NSEC + sec) * 5 + 2] = q30(kk * kk / n);
        end else begin
          t[(p * NSEC + sec) * 5 + 0] = q30(1.0 / n);
          t[(p * NSEC + sec) * 5 + 1] = q30(-2.0 / n);
          t[(p * NSEC + sec) * 5 + 2] = q30(1.0 / n);
        end
        t[(p * NSEC + sec) * 5 + 3] = q30(2.0 * (kk * kk - 1.0) / n);
        t[(p * NSEC + sec) * 5 + 4] = q30((1.0 - d * kk + kk * kk) / n);
      end
    end
    return t;
  endfunction

  localparam coef_t C = mk_coef();

  localparam int unsigned XW = 96;                // internal word

  logic signed [XW-1:0] st1 [NSTR * NSEC];
  logic signed [XW-1:0] st2 [NSTR * NSEC];
  logic [NSTR-1:0]    fresh;

  logic [3:0]         step;       // 0..11
  logic [1:0]         mode;
  logic [5:0]         beam;
  logic signed [31:0] x_re, x_im, y_re;
  logic signed [XW-1:0] y_prev;
  logic               comp;
  logic [2:0]         sec;
  logic [SW-1:0]      sidx;
  logic [$clog2(NSTR)-1:0] stream;

  logic signed [XW-1:0] s1, s2, acc, n1, n2, x, y, yr;
  logic signed [XW-1:0] b0, b1, b2, a1, a2;
  logic signed [31:0]   y_out;

  always_comb begin
    comp   = (step >= 4'd6);
    sec    = comp ? 3'(step - 4'd6) : step[2:0];
    stream = $bits(stream)'(2 * int'(beam) + int'(comp));
    sidx   = SW'(int'(stream) * NSEC + int'(sec));
    x      = (sec == 0) ? (XW'(comp ? x_im : x_re) <<< XF) : y_prev;
    s1     = fresh[stream] ? '0 : st1[sidx];
    s2     = fresh[stream] ? '0 : st2[sidx];
    b0     = XW'(C[(int'(mode) * NSEC + int'(sec)) * 5 + 0]);
    b1     = XW'(C[(int'(mode) * NSEC + int'(sec)) * 5 + 1]);
    b2     = XW'(C[(int'(mode) * NSEC + int'(sec)) * 5 + 2]);
    a1     = XW'(C[(int'(mode) * NSEC + int'(sec)) * 5 + 3]);
    a2     = XW'(C[(int'(mode) * NSEC + int'(sec)) * 5 + 4]);
    acc    = b0 * x + s1;
    y      = acc >>> FRAC;
    n1     = b1 * x - a1 * y + s2;
    n2     = b2 * x - a2 * y;
    // rounded and saturated 32-bit output of the last section
    yr     = (y + (XW'(1) <<< (XF - 1))) >>> XF;
    if (yr > XW'(64'sd2147483647))        y_out = 32'sh7fffffff;
    else if (yr < XW'(-64'sd2147483648))  y_out = -32'sh80000000;
    else                                  y_out = 32'(yr);
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      st1[sidx] <= n1;
      st2[sidx] <= n2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; step <= '0; mode <= '0; beam <= '0;
      x_re <= '0; x_im <= '0; y_prev <= '0; y_re <= '0;
      out_valid <= 1'b0; out <= '0; fresh <= '1;
    end else if (clear) begin
      busy <= 1'b0; step <= '0; out_valid <= 1'b0; fresh <= '1;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        y_prev <= y;
        if (step == 4'd5) y_re <= y_out;
        if (sec == 3'(NSEC - 1)) fresh[stream] <= 1'b0;
        if (step == 4'd11) begin
          busy      <= 1'b0;
          step      <= '0;
          out_valid <= 1'b1;
          out.beam  <= beam;
          out.re    <= y_re;
          out.im    <= y_out;
        end else begin
          step <= step + 1'b1;
        end
      end else if (in_valid) begin
        busy <= 1'b1;
        step <= '0;
        mode <= (pulse > 2'd2) ? 2'd2 : pulse;
        beam <= in.beam;
        x_re <= in.re;
        x_im <= in.im;
      end
    end
  end

  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n || clear) in_valid |-> !busy);

endmodule
