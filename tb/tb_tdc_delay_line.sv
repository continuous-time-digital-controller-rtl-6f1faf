// Testbench of tdc_delay_line: holds the comparator input high for a chosen
// number of cell ticks and checks that y equals that number (saturating at
// CELLS), that it rises by exactly one per tick, and that it falls back by
// one per tick after the input drops. Ticks come every second clock, as in
// the controller.
module tb_tdc_delay_line;
  localparam int CELLS = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0, b = 0;
  logic [6:0] y;
  int tcount = 0;

  tdc_delay_line #(.CELLS(CELLS)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .b(b), .y(y));

  always #10 clk = ~clk;
  always @(posedge clk) tick <= ~tick;

  task automatic chk(input int exp, input string what);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  // wait n ticks, then one more clock for the registered adder
  task automatic wait_ticks(input int n);
    repeat (n) begin
      @(posedge clk iff tick);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int n = 1; n <= 80; n += 7) begin
      @(negedge clk); b = 1;
      for (int s = 1; s <= n; s++) begin
        wait_ticks(1);
        chk(s > CELLS ? CELLS : s, "rise");
        @(negedge clk);
      end
      b = 0;
      wait_ticks(CELLS + 2);
      chk(0, "clear");
    end
    // falling: after a long high, each tick removes one cell
    @(negedge clk); b = 1; wait_ticks(70); chk(CELLS, "saturate");
    @(negedge clk); b = 0;
    for (int s = 1; s <= 10; s++) begin
      wait_ticks(1);
      chk(CELLS - s, "fall");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
