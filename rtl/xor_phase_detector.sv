// xor_phase_detector: exclusive-OR phase detector.
//
// The output is high while the two inputs differ, so its average value is
// proportional to the phase difference (0 .. pi maps to 0 .. VDD, a gain of
// VDD/pi) when both inputs are 50 % square waves of equal frequency. The
// output drives the off-chip RC low-pass filter. It is registered once on
// clk so that the pin carries no combinational glitches (this design's
// choice; the delay of one clk is negligible against the signal periods).
module xor_phase_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_in,
  input  logic fb_in,
  output logic pd_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pd_out <= 1'b0;
    else        pd_out <= ref_in ^ fb_in;
  end
endmodule
