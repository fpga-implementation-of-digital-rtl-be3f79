// clk_prescaler: derives the NCO / loop master clock from the board clock
// as a one-cycle clock-enable pulse every `ratio` clocks.
//
// The reference set-up divides the 100 MHz oscillator by 256 for the loop
// (390.625 kHz) and runs the stand-alone NCO undivided or divided by 8. Here
// the ratio is a run-time input so that one bitstream covers all of these;
// a clock enable rather than a derived clock keeps one clock domain (both
// this design's choices). ratio = 0 or 1 gives an enable every cycle.
// `ce` is registered; the first pulse comes `ratio` clocks after reset.
module clk_prescaler
  import dpll_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PRE_W-1:0] ratio,
  output logic             ce
);
  logic [PRE_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else if (cnt + PRE_W'(1) >= ratio) begin
      cnt <= '0;
      ce  <= 1'b1;
    end else begin
      cnt <= cnt + PRE_W'(1);
      ce  <= 1'b0;
    end
  end
endmodule
