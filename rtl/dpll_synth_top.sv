// dpll_synth_top: digital-PLL frequency synthesizer with programmable
// dividers, f_out = (N' / M') * f_in in lock.
//
// Signal path: the external input `fin` is synchronised and divided by
// 2*M' (input divider), the NCO output is divided by 2*N' (feedback
// divider), and an XOR phase detector compares the two. `pd_out` leaves the
// chip to an RC low-pass filter; the filtered voltage comes back through a
// 12-bit serial ADC (`adc_*` pins), is scaled to the NCO input quantity Nin
// by a constant multiplication about mid-scale, and sets the NCO frequency
//   f_out = Nin * f_ce / (4 * Nr),   f_ce = f_clk / pre_ratio.
// The NCO output is the synthesizer output `fout`. `dac` carries the NCO
// integrator scaled to 8 bits for an observation DAC.
//
// Modes (run-time): nin_sel = 0 closes the loop (Nin from the ADC);
// nin_sel = 1 opens it and drives the NCO from `nin_direct`, which is how
// the NCO is characterised on its own. pre_ratio sets the NCO clock enable
// (256 for the loop at 390.625 kHz from 100 MHz, 1 or 8 for the stand-alone
// NCO). m_div / n_div = 0 bypass the respective divider, so the loop can also
// run as a plain PLL (f_out = f_in). The loop filter and the ADC are off-chip
// parts; every other block of the loop is here. All logic runs on `clk` with
// an asynchronous active-low reset.
//
// The loop structure, the NCO, the f/2N' divider rule, the 390.625 kHz loop
// clock, Nr = 1000 and the 781 Hz / 640 Hz/V normalisation follow the
// reference design; the single clock domain with clock enables, the input
// synchroniser, divider bypass, the run-time mode inputs and the ADC frame
// timing are this design's own choices.
module dpll_synth_top
  import dpll_pkg::*;
#(
  parameter int unsigned NR           = NR_DEFAULT,
  parameter int unsigned NORM_N0      = 8,
  parameter int unsigned NORM_MUL     = 346,
  parameter int unsigned NORM_SHIFT   = 16,
  parameter int unsigned SCLK_HALF    = 4,
  parameter int unsigned QUIET_HALVES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // external reference input (asynchronous)
  input  logic             fin,
  // programmable division factors: /(2*M') on the input, /(2*N') in feedback
  input  div_t             m_div,
  input  div_t             n_div,
  // NCO clock-enable ratio and open-loop control
  input  logic [PRE_W-1:0] pre_ratio,
  input  logic             nin_sel,
  input  nin_t             nin_direct,
  // phase detector output to the off-chip RC low-pass filter
  output logic             pd_out,
  // serial ADC digitising the filter output
  output logic             adc_cs_n,
  output logic             adc_sclk,
  input  logic             adc_sdata,
  // synthesizer output and observation
  output logic             fout,
  output nin_t             nin,
  output logic [DAC_W-1:0] dac
);
  logic      fin_s1, fin_s2;
  logic      ce;
  logic      ref_div, fb_div;
  adc_code_t adc_code;
  logic      adc_valid;
  nin_t      nin_loop;
  acc_t      integ;

  // two-flop synchroniser for the asynchronous input
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_s1 <= 1'b0;
      fin_s2 <= 1'b0;
    end else begin
      fin_s1 <= fin;
      fin_s2 <= fin_s1;
    end
  end

  freq_divider u_div_m (
    .clk(clk), .rst_n(rst_n), .sig_in(fin_s2), .n(m_div), .sig_out(ref_div)
  );

  freq_divider u_div_n (
    .clk(clk), .rst_n(rst_n), .sig_in(fout), .n(n_div), .sig_out(fb_div)
  );

  xor_phase_detector u_pd (
    .clk(clk), .rst_n(rst_n), .ref_in(ref_div), .fb_in(fb_div), .pd_out(pd_out)
  );

  adc_spi_if #(
    .SCLK_HALF(SCLK_HALF), .QUIET_HALVES(QUIET_HALVES)
  ) u_adc (
    .clk(clk), .rst_n(rst_n), .cs_n(adc_cs_n), .sclk(adc_sclk),
    .sdata(adc_sdata), .code(adc_code), .valid(adc_valid)
  );

  adc_normalizer #(
    .N0(NORM_N0), .MUL(NORM_MUL), .SHIFT(NORM_SHIFT)
  ) u_norm (
    .clk(clk), .rst_n(rst_n), .in_valid(adc_valid), .code(adc_code), .nin(nin_loop)
  );

  assign nin = nin_sel ? nin_direct : nin_loop;

  clk_prescaler u_pre (
    .clk(clk), .rst_n(rst_n), .ratio(pre_ratio), .ce(ce)
  );

  nco u_nco (
    .clk(clk), .rst_n(rst_n), .ce(ce), .nin(nin), .nr(nr_t'(NR)),
    .integ(integ), .out(fout)
  );

  integrator_dac_map #(.NR(NR)) u_dac_map (
    .clk(clk), .rst_n(rst_n), .integ(integ), .dac(dac)
  );
endmodule
