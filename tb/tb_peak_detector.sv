// Testbench of peak_detector: plays comparator sequences of a dip and of an
// overshoot, with hand-set delay-line values, and checks that st pulses once,
// one clock after the deepest comparator resets, with that comparator's level
// and N_max; that a deeper comparator setting moves the reference; that a
// second excursion in the same arming is ignored; and that nothing is
// reported while disarmed.
module tb_peak_detector;
  import ctdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, arm = 0, dip = 0;
  logic [7:0] comp = '0;
  logic [7:0][6:0] y = '0;
  logic st;
  logic [2:0] level;
  logic [6:0] n_max;
  int st_count = 0;

  peak_detector dut (.clk(clk), .rst_n(rst_n), .arm(arm), .dip(dip), .comp(comp), .y(y),
                     .st(st), .level(level), .n_max(n_max));

  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && st) st_count <= st_count + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (st=%0d level=%0d n_max=%0d)", what, st, level, n_max); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (3) step();
    rst_n = 1;
    // ---- dip reaching the third threshold -----------------------------------
    dip = 1; arm = 1;
    comp[0] = 1; y[0] = 5; step();
    comp[1] = 1; y[1] = 9; step();
    comp[2] = 1; repeat (5) step();
    y[2] = 37; step();
    chk(st == 0, "no st while falling");
    comp[2] = 0; step();           // deepest resets: peak passed
    chk(st == 1 && level == 3 && n_max == 37, "dip peak");
    step();
    chk(st == 0, "st is one clock");
    comp[1] = 0; step(); comp[0] = 0; step();
    comp[1] = 1; step(); comp[1] = 0; step();
    chk(st_count == 1, "one peak per arming");
    arm = 0; step();
    // ---- deeper comparator moves the reference --------------------------------
    arm = 1;
    comp[0] = 1; comp[1] = 1; y[1] = 12; step();
    comp[2] = 1; y[2] = 3; step();
    comp[3] = 1; y[3] = 21; repeat (3) step();
    comp[3] = 0; step();
    chk(st == 1 && level == 4 && n_max == 21, "dip to level 4");
    comp = '0; arm = 0; step();
    // ---- overshoot on the high side --------------------------------------------
    dip = 0; arm = 1;
    comp[4] = 1; y[4] = 30; step();
    comp[5] = 1; y[5] = 44; repeat (4) step();
    comp[5] = 0; step();
    chk(st == 1 && level == 2 && n_max == 44, "overshoot peak");
    comp = '0; arm = 0; step();
    // ---- disarmed: nothing --------------------------------------------------
    st_count = 0;
    comp[0] = 1; step(); comp[0] = 0; repeat (3) step();
    chk(st_count == 0, "disarmed");
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
