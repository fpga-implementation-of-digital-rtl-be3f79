// adc_normalizer: turns the ADC code of the loop-filter voltage into the
// NCO input quantity Nin by multiplication with a constant, referred to
// mid-scale so that half the supply voltage gives the NCO centre frequency:
//   Nin = N0 + round((code - 2048) * MUL / 2^SHIFT),  clipped at 0.
// Defaults: N0 = 8 gives 8 * 97.66 Hz = 781 Hz with Nr = 1000 and a
// 390.625 kHz NCO clock, the centre frequency of the reference loop;
// MUL / 2^SHIFT = 346 / 65536 is 6.55 Nin per volt for a 3.3 V, 12-bit
// converter, i.e. 640 Hz/V. The ADC range then covers Nin = 0 .. 19
// (0 .. 1.86 kHz), which bounds the lock range. Rounding to nearest and the
// clip at 0 are this design's choices. The result is registered when
// `in_valid` is high and held in between; reset gives N0.
module adc_normalizer
  import dpll_pkg::*;
#(
  parameter int unsigned N0    = 8,
  parameter int unsigned MUL   = 346,
  parameter int unsigned SHIFT = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  adc_code_t code,
  output nin_t      nin
);
  localparam int PROD_W = ADC_W + 24;
  localparam logic signed [PROD_W-1:0] HALF_LSB =
      (SHIFT > 0) ? PROD_W'(1) <<< (SHIFT - 1) : '0;

  localparam logic signed [PROD_W-1:0] K   = PROD_W'(MUL);
  localparam logic signed [PROD_W-1:0] OFS = PROD_W'(N0);
  localparam logic signed [PROD_W-1:0] MID = PROD_W'(1 << (ADC_W - 1));

  logic signed [PROD_W-1:0] delta;
  logic signed [PROD_W-1:0] scaled;

  always_comb begin
    delta  = signed'(PROD_W'(code)) - MID;
    scaled = ((delta * K + HALF_LSB) >>> SHIFT) + OFS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        nin <= nin_t'(N0);
    else if (in_valid) nin <= (scaled < 0) ? '0 : nin_t'(scaled);
  end
endmodule
