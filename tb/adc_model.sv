// Behavioural model of one sample & hold plus 14-bit serial A/D converter
// (simulation only). On the rising edge of the converter clock `sclk` on
// which `stc` is high the analogue input `vin` (volts) is held and
// quantised to a two's complement code, code = round(vin / FS * 8192),
// clipped to -8192..8191. The word then leaves on `sdo`, MSB first: bit i
// (i = 0 for the MSB) is driven on the (CONV_SCLKS + 1 + i)-th falling edge
// of sclk after the capturing edge, matching the read-out timing of
// madc_timing.
module adc_model #(
  parameter int  CONV_SCLKS = 2,
  parameter real FS         = 1.0
) (
  input  logic sclk,
  input  logic stc,
  input  real  vin,
  output logic sdo
);
  logic signed [13:0] held = '0;
  int  nf = 0;
  bit  active = 0;

  function automatic logic signed [13:0] quantise(input real v);
    real c;
    c = v / FS * 8192.0;
    if (c > 8191.0) c = 8191.0;
    if (c < -8192.0) c = -8192.0;
    return 14'($rtoi(c < 0.0 ? c - 0.5 : c + 0.5));
  endfunction

  initial sdo = 1'b0;

  always @(posedge sclk) begin
    if (stc) begin
      held   <= quantise(vin);
      nf     <= 0;
      active <= 1;
    end
  end

  always @(negedge sclk) begin
    if (active) begin
      if (nf + 1 >= CONV_SCLKS + 1 && nf + 1 <= CONV_SCLKS + 14)
        sdo <= held[13 - (nf + 1 - CONV_SCLKS - 1)];
      if (nf + 1 > CONV_SCLKS + 14) active <= 0;
      nf <= nf + 1;
    end
  end
endmodule
