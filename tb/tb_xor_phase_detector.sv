// tb_xor_phase_detector: applies random input pairs and checks the
// registered XOR output one clock later; then drives two equal-frequency
// square waves at a known phase offset and checks the duty cycle of the
// output equals offset / half period.
module tb_xor_phase_detector;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ref_in = 1'b0, fb_in = 1'b0;
  logic pd_out;

  int checks = 0;
  int failures = 0;

  xor_phase_detector dut (.clk(clk), .rst_n(rst_n), .ref_in(ref_in), .fb_in(fb_in), .pd_out(pd_out));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    int high;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ref_in = 1'($urandom);
      fb_in  = 1'($urandom);
      exp_v  = (ref_in != fb_in);
      @(negedge clk);
      checks++;
      if (pd_out !== exp_v) begin
        failures++;
        $display("FAIL pd_out=%0b expected %0b", pd_out, exp_v);
      end
    end
    // phase offsets of 0, 25, 50, 75 and 100 clocks on a 100-clock half period
    for (int off = 0; off <= 100; off += 25) begin
      high = 0;
      for (int t = 0; t < 2000; t++) begin
        @(negedge clk);
        ref_in = ((t / 100) % 2) == 1;
        fb_in  = (((t + 200 - off) / 100) % 2) == 1;
        if (t >= 2 && pd_out) high++;
      end
      checks++;
      if (high < off * 20 - 4 || high > off * 20 + 4) begin
        failures++;
        $display("FAIL offset %0d: high for %0d of 2000 clocks", off, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
