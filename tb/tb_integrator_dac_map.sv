// tb_integrator_dac_map: checks the 8-bit observation code for the ends of
// the triangle (-Nr -> 0, +Nr -> 255), the middle, clipping of the
// overshoot beyond +/-Nr, and random values against a real-valued
// reference floor((x + Nr) / (2 Nr) * 255), for Nr = 1000 and Nr = 37.
module tb_integrator_dac_map;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  acc_t integ = '0;
  logic [DAC_W-1:0] dac_a, dac_b;

  int checks = 0;
  int failures = 0;

  integrator_dac_map dut_a (.clk(clk), .rst_n(rst_n), .integ(integ), .dac(dac_a));
  integrator_dac_map #(.NR(37)) dut_b (.clk(clk), .rst_n(rst_n), .integ(integ), .dac(dac_b));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(int x, int nr);
    real r;
    r = $floor((real'(x) + real'(nr)) / (2.0 * real'(nr)) * 255.0 + 1.0e-9);
    if (r < 0.0) r = 0.0;
    if (r > 255.0) r = 255.0;
    return int'(r);
  endfunction

  initial begin
    int x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: x = -1000;
        1: x = 1000;
        2: x = 0;
        3: x = -1020;
        4: x = 1020;
        default: x = int'($urandom_range(0, 2200)) - 1100;
      endcase
      @(negedge clk);
      integ = acc_t'(x);
      @(negedge clk);
      checks++;
      if (int'(dac_a) != ref_code(x, 1000)) begin
        failures++;
        $display("FAIL x=%0d dac=%0d expected %0d", x, dac_a, ref_code(x, 1000));
      end
      checks++;
      if (int'(dac_b) != ref_code(x, 37)) begin
        failures++;
        $display("FAIL Nr=37 x=%0d dac=%0d expected %0d", x, dac_b, ref_code(x, 37));
      end
    end
    checks++;
    if (!(ref_code(-1000, 1000) == 0 && ref_code(1000, 1000) == 255)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
