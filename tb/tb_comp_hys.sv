// tb_comp_hys: checks the comparator with hysteresis against a reference
// model kept in the testbench: out = a >= (+Nr or -Nr, chosen by the output
// of the previous enabled clock). Random integrator values around both
// thresholds, random clock enables and several Nr values are applied.
module tb_comp_hys;
  import dpll_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  acc_t a = '0;
  nr_t  nr = nr_t'(1000);
  logic out;

  int checks = 0;
  int failures = 0;
  logic model_d = 1'b0;
  logic model_out;
  int rises = 0, falls = 0;

  comp_hys dut (.clk(clk), .rst_n(rst_n), .ce(ce), .a(a), .nr(nr), .out(out));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nrv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      nrv = (k == 0) ? 1000 : int'($urandom_range(50, 3000));
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk);
        nr = nr_t'(nrv);
        a  = acc_t'(int'($urandom_range(0, 2 * nrv + 200)) - nrv - 100);
        if (i % 50 < 3) a = acc_t'((i % 2) ? nrv : -nrv);   // exact thresholds
        ce = ($urandom_range(0, 3) != 0);
        #1;
        model_out = (int'(a) >= (model_d ? -nrv : nrv));
        checks++;
        if (out !== model_out) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d nr=%0d d=%0b out=%0b exp=%0b", a, nrv, model_d, out, model_out);
        end
        @(posedge clk);
        if (ce) begin
          if (model_out && !model_d) rises++;
          if (!model_out && model_d) falls++;
          model_d = model_out;
        end
      end
    end
    checks++;
    if (rises == 0 || falls == 0) begin
      failures++;
      $display("FAIL output never switched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
