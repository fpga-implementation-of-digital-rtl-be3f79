// rc_lpf_model: behavioural model of the off-chip first-order RC low-pass
// loop filter, for testbenches only. The digital input drives the resistor
// with 0 V or VDD; the capacitor voltage `vout` follows
//   dv/dt = (vin - v) / (R * C),
// integrated with forward Euler once per `clk` rising edge (DT seconds).
// Defaults: R = 15.8 kOhm, C = 100 nF (corner about 100 Hz), VDD = 3.3 V.
module rc_lpf_model #(
  parameter real R   = 15.8e3,
  parameter real C   = 100.0e-9,
  parameter real VDD = 3.3,
  parameter real DT  = 10.0e-9,
  parameter real V0  = 1.65
) (
  input  logic clk,
  input  logic din,
  output real  vout
);
  localparam real K = DT / (R * C);

  initial vout = V0;

  always @(posedge clk) begin
    vout <= vout + ((din ? VDD : 0.0) - vout) * K;
  end
endmodule
