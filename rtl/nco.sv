// nco: numerically controlled oscillator built from a switch, an integrator
// and a comparator with hysteresis.
//
// mux_sw feeds either +Nin or -Nin to the integrator, an accumulator in
// summing mode. The comparator with hysteresis (comp_hys) watches the
// integrator against +Nr / -Nr and its output both drives mux_sw's select and
// is the oscillator output. With the output low the integrator ramps up by
// Nin per enabled clock until it reaches +Nr; the output then goes high and
// the integrator ramps down until it falls below -Nr. The integrator output
// is a triangle, the oscillator output a 50 % square wave.
//
// Timing: with Nr a multiple of Nin each half period is 2*Nr/Nin + 1 enabled
// clocks, so the period is 4*Nr/Nin + 2 clocks and
//   f_out ~= Nin / (4 * Ts * Nr)
// (Ts = period of the enabled clock). The two extra clocks per period are
// the one-step overshoot at each threshold; they give the small, growing
// frequency error at large Nin seen when this NCO is measured.
//
// Interface: `ce` is the clock enable (the NCO clock is clk gated by ce),
// `nin` and `nr` may change at any time, `integ` exposes the integrator for
// observation, `out` is the square-wave output. The integrator resets to 0
// (this design's choice). Nin = 0 holds the oscillator still.
module nco
  import dpll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  nin_t nin,
  input  nr_t  nr,
  output acc_t integ,
  output logic out
);
  acc_t step;    // mux_sw output

  // mux_sw: controllable switch commutating +Nin / -Nin
  always_comb step = out ? -acc_t'(nin) : acc_t'(nin);

  // integrator: accumulator in summing mode
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  integ <= '0;
    else if (ce) integ <= integ + step;
  end

  comp_hys u_comp_hys (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (ce),
    .a    (integ),
    .nr   (nr),
    .out  (out)
  );
endmodule
