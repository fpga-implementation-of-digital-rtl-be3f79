// tb_clk_prescaler: checks that clock-enable pulses are one clock wide and
// exactly `ratio` clocks apart for ratio = 1, 8, 64, 256 and random values.
module tb_clk_prescaler;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [PRE_W-1:0] ratio = PRE_W'(256);
  logic ce;

  int checks = 0;
  int failures = 0;

  clk_prescaler dut (.clk(clk), .rst_n(rst_n), .ratio(ratio), .ce(ce));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, gap;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 9; k++) begin
      r = (k == 0) ? 256 : (k == 1) ? 8 : (k == 2) ? 1 : (k == 3) ? 64 : int'($urandom_range(2, 256));
      @(negedge clk);
      ratio = PRE_W'(r);
      // skip the pulse interval that straddles the change
      repeat (2) begin
        @(negedge clk);
        while (!ce) @(negedge clk);
      end
      for (int p = 0; p < 5; p++) begin
        gap = 0;
        do begin
          @(negedge clk);
          gap++;
        end while (!ce);
        checks++;
        if (gap != r) begin
          failures++;
          $display("FAIL ratio %0d: enable gap %0d", r, gap);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
