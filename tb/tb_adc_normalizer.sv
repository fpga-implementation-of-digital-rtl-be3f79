// tb_adc_normalizer: checks the default scaling (mid-scale code 2048 gives
// Nin = 8, 346/65536 Nin per code) and a second instance with another
// constant (N0 = 3, 1/256 per code, so low codes clip at 0) against values
// computed in real arithmetic in the testbench; also checks that the output
// holds while in_valid is low and the reset value. Results are rounded to
// the nearest integer.
module tb_adc_normalizer;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  adc_code_t code = '0;
  nin_t nin_a, nin_b;

  int checks = 0;
  int failures = 0;

  adc_normalizer dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .code(code), .nin(nin_a));
  adc_normalizer #(.N0(3), .MUL(1), .SHIFT(8)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                                                  .code(code), .nin(nin_b));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  initial begin
    int c, ea, eb;
    int prev_a;
    @(negedge clk);
    check(nin_a == 8, $sformatf("reset value %0d", nin_a));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      c = (i == 0) ? 2048 : (i == 1) ? 0 : (i == 2) ? 4095 : int'($urandom_range(0, 4095));
      @(negedge clk);
      prev_a = int'(nin_a);
      code = adc_code_t'(c);
      in_valid = (i < 3) || ($urandom_range(0, 1) == 1);
      @(negedge clk);
      if (in_valid) begin
        ea = 8 + int'($floor(real'(c - 2048) * 346.0 / 65536.0 + 0.5));
        eb = 3 + int'($floor(real'(c - 2048) / 256.0 + 0.5));
        if (ea < 0) ea = 0;
        if (eb < 0) eb = 0;
        check(int'(nin_a) == ea, $sformatf("code %0d: Nin %0d expected %0d", c, nin_a, ea));
        check(int'(nin_b) == eb, $sformatf("code %0d: Nin(b) %0d expected %0d", c, nin_b, eb));
      end else begin
        check(int'(nin_a) == prev_a, "output changed without in_valid");
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
