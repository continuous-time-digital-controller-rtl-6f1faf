// Testbench of pid_compensator: feeds random error codes once per update
// strobe and checks the duty output against an integer model of
// d[n] = d[n-1] + A e[n] + B e[n-1] + C e[n-2] (Q8, clamped to 0..PERIOD);
// checks that `hold` freezes the state and that clocks without `en` change
// nothing.
module tb_pid_compensator;
  import ctdc_pkg::*;
  localparam int A = 2800, B = -4300, C = 1800, P = 125;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, hold = 0;
  err_t err = '0;
  logic [6:0] duty;
  int acc = 45 * 256, m1 = 0, m2 = 0;

  pid_compensator dut (.clk(clk), .rst_n(rst_n), .en(en), .hold(hold), .err(err), .duty(duty));

  always #10 clk = ~clk;

  task automatic chk(input string what);
    checks++;
    if (int'(duty) != acc / 256) begin
      failures++;
      $display("FAIL %s: duty=%0d model=%0d", what, duty, acc / 256);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    chk("reset");
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      e    = $urandom_range(0, 8) - 4;
      if (n > 1000 && n < 1100) e = 4;      // drive into the upper clamp
      if (n > 1500 && n < 1600) e = -4;     // and the lower one
      err  = err_t'(e);
      hold = ($urandom_range(0, 9) == 0);
      en   = 1;
      @(negedge clk); en = 0;
      if (!hold) begin
        acc = acc + A * e + B * m1 + C * m2;
        if (acc < 0) acc = 0;
        if (acc > P * 256) acc = P * 256;
        m2 = m1; m1 = e;
      end
      chk(hold ? "hold" : "update");
      err = err_t'($urandom_range(0, 8) - 4);
      @(negedge clk);
      chk("no strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
