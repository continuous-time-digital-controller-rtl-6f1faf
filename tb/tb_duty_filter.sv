// Testbench of duty_filter: applies duty steps and random duty sequences,
// runs a floating-point first-order filter y += (x - y)/16 alongside, and
// checks the output within one count after every update; also checks the
// reset value and that the output does not move without `en`.
module tb_duty_filter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [6:0] d_in = 45, d_lp;
  real ref_y = 45.0;

  duty_filter dut (.clk(clk), .rst_n(rst_n), .en(en), .d_in(d_in), .d_lp(d_lp));

  always #10 clk = ~clk;

  task automatic chk(input string what);
    checks++;
    if ((real'(d_lp) - ref_y) ** 2 > 1.0) begin
      failures++;
      $display("FAIL %s: d_lp=%0d model=%f", what, d_lp, ref_y);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    chk("reset");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n < 100) d_in = 70;
      else if (n < 150) d_in = 20;
      else d_in = 7'($urandom_range(0, 125));
      en = 1;
      @(negedge clk); en = 0;
      ref_y = ref_y + (real'(d_in) - ref_y) / 16.0;
      chk("update");
      d_in = 7'($urandom_range(0, 125));
      repeat (2) @(negedge clk);
      chk("hold");
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
