// Testbench of dpwm: for a range of duty commands, applied at the end-of-
// period strobe, it counts over the next switching period the clocks c(t)
// is high (must equal the duty) and checks that the strobe comes once every
// PERIOD = 125 clocks (400 kHz at 50 MHz), in the period's last clock. A
// duty change after the period has started must not affect it.
module tb_dpwm;
  localparam int P = 125;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [6:0] duty = 0;
  logic c, pe;

  logic sync = 0, sync_off = 0;
  dpwm dut (.clk(clk), .rst_n(rst_n), .duty(duty), .sync(sync), .sync_off(sync_off), .c(c), .period_end(pe));

  always #10 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int hi, pe_at, exp_duty;
      exp_duty = (n < 3) ? (n == 0 ? 0 : (n == 1 ? P : 1)) : $urandom_range(0, P);
      @(posedge clk iff pe);            // last clock of a period
      #1 duty = 7'(exp_duty);            // present in the clock that follows
      @(posedge clk);                    // the new period starts, duty taken
      #1 duty = 7'($urandom_range(0, P));
      hi = 0; pe_at = -1;
      for (int s = 0; s < P; s++) begin
        if (c) hi++;
        if (pe) pe_at = s;
        if (s < P - 1) begin @(posedge clk); #1; end
      end
      checks++;
      if (hi != exp_duty || pe_at != P - 2) begin
        failures++;
        $display("FAIL duty %0d: high %0d clocks, strobe at %0d", exp_duty, hi, pe_at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
