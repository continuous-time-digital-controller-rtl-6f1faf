// Testbench of error_encoder: sweeps the output voltage across the comparator
// window in 1 mV steps, builds the comparator outputs from the thresholds
// Vref -/+ k*25 mV, and checks the signed error code against the deviation
// computed directly in millivolts. Also checks that a bubble in the
// thermometer code does not lower the code.
module tb_error_encoder;
  import ctdc_pkg::*;

  int checks = 0, failures = 0;
  logic [N_COMP-1:0] comp;
  err_t err;

  error_encoder dut (.comp(comp), .err(err));

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(err) != exp) begin
      failures++;
      $display("FAIL %s: comp=%b err=%0d expected %0d", what, comp, err, exp);
    end
  endtask

  initial begin
    for (int dev_mv = -130; dev_mv <= 130; dev_mv++) begin   // dev = v - Vref
      int exp;
      for (int k = 0; k < 4; k++) begin
        comp[k]     = (dev_mv < -25 * (k + 1));
        comp[4 + k] = (dev_mv >  25 * (k + 1));
      end
      // expected: number of whole 25 mV steps beyond the reference, sign of Vref - v
      if (dev_mv < 0) exp = ((-dev_mv - 1) / 25 > 4) ? 4 : (-dev_mv - 1) / 25;
      else if (dev_mv > 0) exp = -(((dev_mv - 1) / 25 > 4) ? 4 : (dev_mv - 1) / 25);
      else exp = 0;
      #1 check(exp, "sweep");
    end
    comp = 8'b0000_0101; #1 check(3, "low bubble");
    comp = 8'b1010_0000; #1 check(-4, "high bubble");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
