// Testbench of mode_control: checks entry into dynamic mode on |e| >= 2 in
// both directions with the right transient type, no entry on |e| = 1 or when
// disabled, exit on seq_done, no re-entry until the error returns inside the
// window, and the timeout.
module tb_mode_control;
  import ctdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 1, seq_done = 0;
  err_t err = '0;
  logic mode, dip, enter, timed_out;
  int enters = 0;

  mode_control #(.TIMEOUT(100)) dut (.clk(clk), .rst_n(rst_n), .enable(enable), .err(err),
    .seq_done(seq_done), .mode(mode), .dip(dip), .enter(enter), .timed_out(timed_out));

  always #10 clk = ~clk;
  always @(posedge clk) if (enter) enters <= enters + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: mode=%0d dip=%0d enters=%0d", what, mode, dip, enters); end
  endtask
  task automatic step(int n = 1); repeat (n) @(posedge clk); #1; endtask

  initial begin
    step(2); rst_n = 1;
    err = 1;  step(5); chk(!mode && enters == 0, "|e|=1 stays in PID");
    err = -1; step(5); chk(!mode, "|e|=1 high side");
    err = 2;  #1 chk(enter && dip && !mode, "enter announced"); step(1); chk(mode && dip && !enter, "dip entry in one clock");
    err = 4;  step(10); chk(mode, "stays dynamic");
    seq_done = 1; step(1); seq_done = 0; chk(!mode, "exit on seq_done");
    step(5); chk(!mode && enters == 1, "no re-entry while outside");
    err = 0; step(2);
    err = -3; #1 chk(enter && !dip, "overshoot announced"); step(1); chk(mode && !dip && enters == 2, "overshoot entry");
    seq_done = 1; step(1); seq_done = 0; err = 0; step(2);
    enable = 0; err = 4; step(5); chk(!mode && enters == 2, "disabled");
    enable = 1; step(1); chk(mode, "enabled again");
    step(98); chk(mode, "before timeout"); step(2); chk(!mode, "timeout");
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
