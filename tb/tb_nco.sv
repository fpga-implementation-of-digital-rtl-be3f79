// tb_nco: runs the NCO with Nr = 1000 and measures its output period,
// pulse width and integrator swing.
//  * Nin = 1 .. 20 with the enable high every clock: the frequency must be
//    Nin / (4 * Nr) per clock within 1.5 %, and where Nin divides 2*Nr the
//    period must be exactly 4*Nr/Nin + 2 clocks with equal high and low
//    halves (50 % duty).
//  * With a 100 MHz clock and an enable every 64 clocks, Nin = 1 and 20 must
//    give 390.43 Hz and 7.735 kHz (periods 4002 and 202 enabled clocks).
//  * The integrator must swing between -Nr - Nin and +Nr.
module tb_nco;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  nin_t nin = nin_t'(1);
  nr_t  nr = nr_t'(1000);
  acc_t integ;
  logic out;

  int checks = 0;
  int failures = 0;
  int ce_div = 1;
  int ce_cnt = 0;

  nco dut (.clk(clk), .rst_n(rst_n), .ce(ce), .nin(nin), .nr(nr), .integ(integ), .out(out));

  always #5 clk = ~clk;

  // enable generator: one pulse every ce_div clocks
  always @(posedge clk) begin
    if (ce_cnt + 1 >= ce_div) begin
      ce_cnt <= 0;
      ce <= 1'b1;
    end else begin
      ce_cnt <= ce_cnt + 1;
      ce <= 1'b0;
    end
  end

  initial begin
    #20_000_000;
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
    end
  endtask

  // measure one full period after settling: returns clocks high, clocks low
  int imin, imax;   // integrator extremes seen by the last measurement

  task automatic measure(output longint hi, output longint lo);
    longint t0, t1, t2;
    imin = 1 << 30;
    imax = -(1 << 30);
    @(posedge out);
    @(posedge out);
    t0 = $time;
    fork
      begin
        @(negedge out);
        t1 = $time;
        @(posedge out);
        t2 = $time;
      end
      begin
        while (1) begin
          @(posedge clk);
          if (int'(integ) < imin) imin = int'(integ);
          if (int'(integ) > imax) imax = int'(integ);
        end
      end
    join_any
    disable fork;
    hi = (t1 - t0) / 10;
    lo = (t2 - t1) / 10;
  endtask

  initial begin
    longint hi, lo;
    real f_meas, f_ideal, err;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 1; n <= 20; n++) begin
      @(negedge clk);
      nin = nin_t'(n);
      measure(hi, lo);
      f_meas  = 1.0 / real'(hi + lo);
      f_ideal = real'(n) / 4000.0;
      err = (f_ideal - f_meas) / f_ideal * 100.0;
      check(err >= 0.0 && err <= 1.5, $sformatf("Nin=%0d frequency error %f %%", n, err));
      if ((2000 % n) == 0) begin
        check(hi == 2000 / n + 1 && lo == 2000 / n + 1,
              $sformatf("Nin=%0d hi=%0d lo=%0d clocks", n, hi, lo));
        check(imax == 1000 && imin == -1000 - n,
              $sformatf("Nin=%0d integrator swing %0d..%0d", n, imin, imax));
      end
    end

    // NCO clock = 100 MHz / 64
    ce_div = 64;
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      nin = nin_t'((k == 0) ? 1 : 20);
      measure(hi, lo);
      f_meas = 1.0e9 / (real'(hi + lo) * 10.0);
      if (k == 0)
        check(f_meas > 390.40 && f_meas < 390.46, $sformatf("Nin=1 at 1.5625 MHz: %f Hz", f_meas));
      else
        check(f_meas > 7735.0 && f_meas < 7735.4, $sformatf("Nin=20 at 1.5625 MHz: %f Hz", f_meas));
      check(hi == lo, "duty cycle 50 %% with slow enable");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
