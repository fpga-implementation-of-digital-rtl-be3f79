// freq_divider: programmable frequency divider, f_out = f_in / (2 * N').
//
// A counter advances on every rising edge of the input signal; when it has
// counted N' edges the output toggles and the counter restarts. The output
// therefore has a 50 % duty cycle and only even division ratios are
// possible, as the divider is specified. The same module serves as the
// input divider (/M) and the feedback divider (/N) of the synthesizer.
//
// Implementation: instead of clocking the counter by the divided signal, the
// input is sampled by clk and its rising edges are detected, so the whole
// design stays in one clock domain (this design's choice); `sig_in` must
// already be synchronous to clk. The output toggles one clk after the edge
// that completes the count. N' = 0 selects bypass: the output follows the
// input directly, which lets the loop run without dividers (also this
// design's choice). N' may be changed at run time; the counter restarts if
// it is already past the new value.
module freq_divider
  import dpll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sig_in,
  input  div_t n,
  output logic sig_out
);
  logic sig_q;
  logic div_q;
  div_t cnt;
  logic rise;

  assign rise = sig_in && !sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q <= 1'b0;
      div_q <= 1'b0;
      cnt   <= '0;
    end else begin
      sig_q <= sig_in;
      if (rise) begin
        if (cnt >= n - div_t'(1)) begin
          cnt   <= '0;
          div_q <= ~div_q;
        end else begin
          cnt <= cnt + div_t'(1);
        end
      end
    end
  end

  assign sig_out = (n == '0) ? sig_in : div_q;
endmodule
