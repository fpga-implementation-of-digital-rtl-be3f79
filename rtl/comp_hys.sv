// comp_hys: comparator with hysteresis, the output stage of the NCO.
//
// A relational element computes out = (a >= b). The threshold b comes from a
// 2:1 multiplexer that chooses between +Nr and -Nr; its select line is the
// comparator output delayed by one enabled clock (z^-1). While the delayed
// output is low the threshold is +Nr, so the output rises once `a` reaches
// +Nr; while it is high the threshold is -Nr, so the output stays high until
// `a` falls below -Nr. Equal magnitudes of the two thresholds give a
// symmetric (50 % duty) oscillation in the NCO.
//
// Interface: `a` is the signed integrator value, `nr` the unsigned reference
// magnitude. `out` is combinational from `a` and the delay register, exactly
// as in the block diagram; the delay register updates on clk when `ce` is
// high and resets low (reset polarity and value are this design's choice).
module comp_hys
  import dpll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  acc_t a,
  input  nr_t  nr,
  output logic out
);
  logic out_d;   // z^-1 delayed comparator output, selects the threshold
  acc_t thr;

  always_comb begin
    thr = out_d ? -acc_t'(nr) : acc_t'(nr);
    out = (a >= thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out_d <= 1'b0;
    else if (ce) out_d <= out;
  end
endmodule
