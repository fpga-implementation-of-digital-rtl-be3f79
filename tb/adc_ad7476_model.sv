// adc_ad7476_model: behavioural model of a 12-bit serial ADC of the AD7476A
// type (the converter on a PmodAD1 module), for testbenches only.
// The analog input `vin` (volts, 0 .. VREF) is sampled when cs_n falls and
// converted to code = floor(vin / VREF * 4096), clipped to 0 .. 4095. The
// 16-bit frame (four zeros, then the code MSB first) is shifted out: the
// first bit is driven when cs_n falls, each following bit on a falling edge
// of sclk. `last_code` holds the code of the frame in progress.
module adc_ad7476_model #(
  parameter real VREF = 3.3
) (
  input  real  vin,
  input  logic cs_n,
  input  logic sclk,
  output logic sdata,
  output int   last_code,
  output int   conversions
);
  logic [15:0] sr = '0;

  initial begin
    sdata = 1'b0;
    last_code = 0;
    conversions = 0;
  end

  always @(negedge cs_n) begin
    int c;
    c = int'($floor(vin / VREF * 4096.0));
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    last_code = c;
    conversions++;
    sr = {4'b0000, 12'(c)};
    sdata = sr[15];
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      sr = {sr[14:0], 1'b0};
      sdata = sr[15];
    end
  end
endmodule
