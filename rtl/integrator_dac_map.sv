// integrator_dac_map: scales the NCO integrator to an 8-bit code for an
// external observation DAC, so that the triangle swing -Nr .. +Nr appears as
// 0 .. 255 (0 .. full-scale volts at the DAC):
//   dac = clamp(((integ + NR) * 255) / (2 * NR), 0, 255).
// The one-step overshoot beyond +/-Nr is clipped. The output is registered
// on clk. NR is a parameter so that the division is by a constant.
module integrator_dac_map
  import dpll_pkg::*;
#(
  parameter int unsigned NR = NR_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  acc_t             integ,
  output logic [DAC_W-1:0] dac
);
  localparam int FULL = (1 << DAC_W) - 1;

  logic signed [31:0] scaled;

  always_comb begin
    scaled = ((int'(integ) + int'(NR)) * FULL) / (2 * int'(NR));
    if (scaled < 0)         scaled = 0;
    else if (scaled > FULL) scaled = FULL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac <= '0;
    else        dac <= DAC_W'(scaled);
  end
endmodule
