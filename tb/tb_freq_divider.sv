// tb_freq_divider: drives a square wave with random half periods into the
// divider and checks that every output half period spans exactly N' input
// rising edges (f_out = f_in / 2N', 50 % duty in input periods), for N' = 1,
// 10, 30 and random values, and that N' = 0 passes the input through.
module tb_freq_divider;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sig_in = 1'b0;
  div_t n = div_t'(1);
  logic sig_out;

  int checks = 0;
  int failures = 0;
  int in_edges = 0;
  logic gen_en = 1'b1;

  freq_divider dut (.clk(clk), .rst_n(rst_n), .sig_in(sig_in), .n(n), .sig_out(sig_out));

  always #5 clk = ~clk;

  // input generator: random half periods of 2..9 clocks
  initial begin
    forever begin
      repeat ($urandom_range(2, 9)) @(posedge clk);
      if (gen_en) begin
        sig_in <= ~sig_in;
        if (!sig_in) in_edges++;
      end
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nv;
    int e0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      nv = (k == 0) ? 1 : (k == 1) ? 10 : (k == 2) ? 30 : int'($urandom_range(1, 60));
      @(negedge clk);
      n = div_t'(nv);
      // let the counter resynchronise to the new factor
      @(posedge sig_out);
      @(posedge sig_out);
      for (int p = 0; p < 6; p++) begin
        e0 = in_edges;
        @(sig_out);
        checks++;
        if (in_edges - e0 != nv) begin
          failures++;
          $display("FAIL N'=%0d half period of %0d input edges", nv, in_edges - e0);
        end
      end
    end
    // bypass
    @(negedge clk);
    n = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (sig_out !== sig_in) begin
        failures++;
        $display("FAIL bypass");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
