// tb_dpll_lock_range: measures the lock range and the capture behaviour of
// the closed loop at its default parameters (100 MHz clock, NCO enable every
// 256 clocks, no dividers), with behavioural models of the RC filter and the
// serial ADC.
//  * Lock range: starting locked at 780 Hz, the input is walked up in 50 Hz
//    steps, then from 780 Hz down, until the output no longer follows within
//    1 %. The highest and lowest followed frequencies are reported. The
//    upper edge must lie between 1.5 kHz (the loop must still follow there)
//    and 1.86 kHz (the NCO frequency at the largest ADC code); the whole
//    range must be 1.7 kHz within 30 %.
//  * Capture: from reset, an input 300 Hz above and 300 Hz below the 781 Hz
//    centre frequency must be acquired without walking; offsets of 400 and
//    500 Hz are tried and reported.
module tb_dpll_lock_range;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fin = 1'b0;
  logic pd_out, adc_cs_n, adc_sclk, adc_sdata, fout;
  nin_t nin;
  logic [DAC_W-1:0] dac;
  real vfilt;
  int  adc_last, adc_conv;

  int checks = 0;
  int failures = 0;
  real fin_half_ns = 641025.641;

  dpll_synth_top dut (
    .clk(clk), .rst_n(rst_n), .fin(fin), .m_div('0), .n_div('0),
    .pre_ratio(PRE_W'(256)), .nin_sel(1'b0), .nin_direct('0),
    .pd_out(pd_out), .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_sdata(adc_sdata),
    .fout(fout), .nin(nin), .dac(dac)
  );

  rc_lpf_model lpf (.clk(clk), .din(pd_out), .vout(vfilt));

  adc_ad7476_model adc (.vin(vfilt), .cs_n(adc_cs_n), .sclk(adc_sclk), .sdata(adc_sdata),
                        .last_code(adc_last), .conversions(adc_conv));

  always #5 clk = ~clk;

  initial forever begin
    #(fin_half_ns);
    fin = ~fin;
  end

  int fout_edges = 0;
  always @(posedge fout) fout_edges++;

  initial begin
    #4_500_000_000;
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

  task automatic set_freq(input real f);
    fin_half_ns = 1.0e9 / f / 2.0;
  endtask

  // settle, then compare output and input edge counts over about 25 ms
  task automatic follows(input real f, input longint settle_ns, output bit ok);
    int e0, periods;
    real ratio;
    set_freq(f);
    #(settle_ns);
    periods = int'(f / 40.0) + 10;
    @(posedge fin);
    e0 = fout_edges;
    repeat (periods) @(posedge fin);
    ratio = real'(fout_edges - e0) / real'(periods);
    ok = (ratio > 0.99 && ratio < 1.01);
  endtask

  task automatic restart();
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    real f, f_hi, f_lo;
    bit ok;
    int d;

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- lock range, upward walk
    follows(780.0, 120_000_000, ok);
    check(ok, "locked at 780 Hz");
    f_hi = 780.0;
    f = 780.0;
    while (f < 2500.0) begin
      f = f + 50.0;
      follows(f, 25_000_000, ok);
      if (!ok) break;
      f_hi = f;
    end
    $display("upper edge of the lock range: %0.0f Hz", f_hi);

    // ---- back to the centre, downward walk
    restart();
    follows(780.0, 120_000_000, ok);
    f_lo = 780.0;
    f = 780.0;
    while (f > 100.0) begin
      f = f - 50.0;
      follows(f, 25_000_000, ok);
      if (!ok) break;
      f_lo = f;
    end
    $display("lower edge of the lock range: %0.0f Hz", f_lo);

    check(f_hi >= 1500.0 && f_hi < 1860.0, $sformatf("upper edge %0.0f Hz", f_hi));
    check((f_hi - f_lo) > 1190.0 && (f_hi - f_lo) < 2210.0,
          $sformatf("lock range %0.0f Hz (1.7 kHz +/- 30 %%)", f_hi - f_lo));

    // ---- capture from reset, 300, 400 and 500 Hz either side of the centre
    for (int k = 0; k < 6; k++) begin
      d = 300 + 100 * (k / 2);
      f = (k % 2 == 0) ? 781.0 + real'(d) : 781.0 - real'(d);
      restart();
      follows(f, 120_000_000, ok);
      if (d == 300) check(ok, $sformatf("captured %0.0f Hz from reset", f));
      else $display("%s %0.0f Hz from reset", ok ? "captured" : "not captured", f);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
