// tb_adc_spi_if: connects the serial ADC interface to a behavioural AD7476A
// model whose input voltage is changed at random, and checks that every
// reported code equals the code the model converted in that frame, that
// conversions follow each other every 136 clocks (16 serial clocks of 8
// clocks plus 8 clocks of quiet time), and that each frame has exactly 16
// falling serial-clock edges.
module tb_adc_spi_if;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cs_n, sclk, sdata;
  adc_code_t code;
  logic valid;
  real vin = 0.0;
  int last_code, conversions;

  int checks = 0;
  int failures = 0;
  int sclk_pulses = 0;

  adc_spi_if dut (.clk(clk), .rst_n(rst_n), .cs_n(cs_n), .sclk(sclk), .sdata(sdata),
                  .code(code), .valid(valid));

  adc_ad7476_model adc (.vin(vin), .cs_n(cs_n), .sclk(sclk), .sdata(sdata),
                        .last_code(last_code), .conversions(conversions));

  always #5 clk = ~clk;

  always @(negedge cs_n) sclk_pulses = 0;
  always @(negedge sclk) if (!cs_n) sclk_pulses++;

  // change the analog input at random times
  initial begin
    forever begin
      repeat ($urandom_range(20, 400)) @(posedge clk);
      vin = real'($urandom_range(0, 33000)) / 10000.0;
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_prev;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t_prev = -1;
    n = 0;
    while (n < 400) begin
      @(negedge clk);
      if (valid) begin
        checks++;
        if (int'(code) != last_code) begin
          failures++;
          $display("FAIL code %0d, converter produced %0d", code, last_code);
        end
        checks++;
        if (sclk_pulses != 16) begin
          failures++;
          $display("FAIL %0d serial clocks in a frame", sclk_pulses);
        end
        if (t_prev >= 0) begin
          checks++;
          if (($time - t_prev) / 10 != 136) begin
            failures++;
            $display("FAIL frame spacing %0d clocks", ($time - t_prev) / 10);
          end
        end
        t_prev = $time;
        n++;
      end
    end
    checks++;
    if (conversions < 400) begin
      failures++;
      $display("FAIL only %0d conversions", conversions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
