// tb_dpll_synth_top: end-to-end test of the synthesizer at its default
// parameters, with a 100 MHz clock. The loop is closed through behavioural
// models of the off-chip RC filter (15.8 kOhm, 100 nF) and of the 12-bit
// serial ADC. Phases:
//  1. open loop, NCO enable every clock: Nin = 20 and 1 give periods of 202
//     and 4002 clocks (about 500 kHz and 25 kHz); the observation DAC code
//     sweeps 0 .. 255;
//  2. open loop, enable every 8 clocks: Nin = 1 gives 8 * 4002 clocks;
//  3. closed loop, enable every 256 clocks (390.625 kHz), both dividers
//     bypassed: a 780 Hz input, and then an input walked in 80 Hz steps up
//     to 1.5 kHz near the top of the lock range, must be followed with a
//     long-run frequency error below 0.5 %;
//  4. synthesizer: 50 Hz input, input divider M' = 1, feedback divider
//     N' = 10 and 30: the output must be N' * 50 Hz within 1 %.
// Each mechanism (open loop, each prescaler ratio, divider bypass, dividers
// active, lock, ADC conversions, full DAC swing) is counted and one that
// never happened counts as a failure.
module tb_dpll_synth_top;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fin = 1'b0;
  div_t m_div = '0, n_div = '0;
  logic [PRE_W-1:0] pre_ratio = PRE_W'(1);
  logic nin_sel = 1'b1;
  nin_t nin_direct = nin_t'(20);
  logic pd_out, adc_cs_n, adc_sclk, adc_sdata, fout;
  nin_t nin;
  logic [DAC_W-1:0] dac;

  real vfilt;
  int  adc_last, adc_conv;

  int checks = 0;
  int failures = 0;
  int n_open = 0, n_pre1 = 0, n_pre8 = 0, n_pre256 = 0, n_bypass = 0;
  int n_divided = 0, n_locked = 0, n_dac_full = 0;

  real fin_half_ns = 641025.641;   // half period of the external input
  logic fin_en = 1'b0;

  dpll_synth_top dut (
    .clk(clk), .rst_n(rst_n), .fin(fin), .m_div(m_div), .n_div(n_div),
    .pre_ratio(pre_ratio), .nin_sel(nin_sel), .nin_direct(nin_direct),
    .pd_out(pd_out), .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_sdata(adc_sdata),
    .fout(fout), .nin(nin), .dac(dac)
  );

  rc_lpf_model lpf (.clk(clk), .din(pd_out), .vout(vfilt));

  adc_ad7476_model adc (.vin(vfilt), .cs_n(adc_cs_n), .sclk(adc_sclk), .sdata(adc_sdata),
                        .last_code(adc_last), .conversions(adc_conv));

  always #5 clk = ~clk;

  // external input: square wave, 50 % duty
  initial begin
    forever begin
      #(fin_half_ns);
      if (fin_en) fin = ~fin;
    end
  end

  initial begin
    #3_500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end else begin
      $display("ok   %s", what);
    end
  endtask

  // clocks between two rising edges of fout
  // (gives up, and ends the test, if fout does not toggle within 5 ms)
  task automatic fout_period(output longint clocks);
    longint t0;
    bit done;
    done = 1'b0;
    fork
      begin
        @(posedge fout);
        @(posedge fout);
        t0 = $time;
        @(posedge fout);
        done = 1'b1;
      end
      #5_000_000;
    join_any
    disable fork;
    if (!done) begin
      failures++;
      $display("FAIL fout does not oscillate");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    clocks = ($time - t0) / 10;
  endtask

  // count fout rising edges over `periods` rising edges of fin
  int fout_edges = 0;
  always @(posedge fout) fout_edges++;

  task automatic count_ratio(input int periods, output int edges);
    int e0;
    @(posedge fin);
    e0 = fout_edges;
    repeat (periods) @(posedge fin);
    edges = fout_edges - e0;
  endtask

  initial begin
    longint per;
    int dmin, dmax, edges;
    real f_in, f_out, err;

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. open loop, NCO at the full clock rate
    nin_sel = 1'b1;
    pre_ratio = PRE_W'(1);
    nin_direct = nin_t'(20);
    fout_period(per);
    check(per == 202, $sformatf("open loop Nin=20, /1: period %0d clocks", per));
    nin_direct = nin_t'(1);
    fout_period(per);
    dmin = 255;
    dmax = 0;
    repeat (4100) begin
      @(negedge clk);
      if (int'(dac) < dmin) dmin = int'(dac);
      if (int'(dac) > dmax) dmax = int'(dac);
    end
    check(per == 4002, $sformatf("open loop Nin=1, /1: period %0d clocks", per));
    check(dmin == 0 && dmax == 255, $sformatf("DAC swing %0d..%0d", dmin, dmax));
    if (dmin == 0 && dmax == 255) n_dac_full++;
    n_open++;
    n_pre1++;

    // ---- 2. open loop, NCO clock 100 MHz / 8
    pre_ratio = PRE_W'(8);
    fout_period(per);
    check(per == 8 * 4002, $sformatf("open loop Nin=1, /8: period %0d clocks", per));
    n_pre8++;

    // ---- 3. closed loop, 390.625 kHz NCO clock, no dividers
    pre_ratio = PRE_W'(256);
    nin_sel = 1'b0;
    m_div = '0;
    n_div = '0;
    for (int k = 0; k < 2; k++) begin
      if (k == 0) begin
        f_in = 780.0;
        fin_half_ns = 1.0e9 / f_in / 2.0;
        fin_en = 1'b1;
        #150_000_000;
      end else begin
        // walk the input up to the edge of the lock range in 80 Hz steps,
        // staying inside the capture range at every step
        while (f_in < 1500.0) begin
          f_in = (f_in + 80.0 > 1500.0) ? 1500.0 : f_in + 80.0;
          fin_half_ns = 1.0e9 / f_in / 2.0;
          #40_000_000;
        end
        #60_000_000;
      end
      count_ratio((k == 0) ? 100 : 200, edges);
      f_out = f_in * real'(edges) / real'((k == 0) ? 100 : 200);
      err = (f_out - f_in) / f_in * 100.0;
      check(err < 0.5 && err > -0.5, $sformatf("loop at %0.0f Hz: output %0.2f Hz (%0.3f %%), Nin=%0d",
                                                f_in, f_out, err, nin));
      if (err < 0.5 && err > -0.5) n_locked++;
      n_bypass++;
      n_pre256++;
    end

    // ---- 4. synthesizer, 50 Hz input, M' = 1, N' = 10 and 30
    f_in = 50.0;
    fin_half_ns = 1.0e9 / f_in / 2.0;
    m_div = div_t'(1);
    for (int k = 0; k < 2; k++) begin
      n_div = div_t'((k == 0) ? 10 : 30);
      #300_000_000;
      count_ratio(20, edges);
      f_out = f_in * real'(edges) / 20.0;
      err = (f_out - f_in * real'(n_div)) / (f_in * real'(n_div)) * 100.0;
      check(err < 1.0 && err > -1.0, $sformatf("synthesizer N'=%0d M'=1: output %0.2f Hz (%0.3f %%)",
                                                n_div, f_out, err));
      if (err < 1.0 && err > -1.0) n_locked++;
      n_divided++;
    end

    // ---- mechanism coverage
    check(n_open > 0, $sformatf("open-loop runs: %0d", n_open));
    check(n_pre1 > 0 && n_pre8 > 0 && n_pre256 > 0,
          $sformatf("prescaler /1 /8 /256 used %0d %0d %0d times", n_pre1, n_pre8, n_pre256));
    check(n_bypass > 0, $sformatf("divider bypass runs: %0d", n_bypass));
    check(n_divided > 0, $sformatf("divided runs: %0d", n_divided));
    check(n_locked > 0, $sformatf("locked runs: %0d", n_locked));
    check(adc_conv > 1000, $sformatf("ADC conversions: %0d", adc_conv));
    check(n_dac_full > 0, $sformatf("full DAC swings: %0d", n_dac_full));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
