// Testbench of optimal_sequence_gen: for dips and overshoots with random
// t_on / t_off it checks that `enter` sets u (dip) or clears it (overshoot)
// at once, that u keeps that value for exactly the first interval after
// `go` (t_on cells for a dip, t_off for an overshoot; 2 clocks per cell),
// then holds the opposite value for the second interval, and that `done`
// pulses at the end. Zero-length intervals are included.
module tb_optimal_sequence_gen;
  import ctdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0, enter = 0, dip = 0, go = 0;
  cells_t t_on = '0, t_off = '0;
  logic u, done;

  optimal_sequence_gen dut (.clk(clk), .rst_n(rst_n), .tick(tick), .enter(enter), .dip(dip),
    .go(go), .t_on(t_on), .t_off(t_off), .u(u), .done(done));

  always #10 clk = ~clk;
  always @(posedge clk) tick <= ~tick;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int first, second, c1, c2;
      bit d;
      d = n[0];
      @(negedge clk); dip = d; enter = 1;
      @(negedge clk); enter = 0;
      chk(u == d, "selector");
      repeat ($urandom_range(1, 20)) @(negedge clk);
      chk(u == d, "held before go");
      t_on  = cells_t'((n % 7 == 3) ? 0 : $urandom_range(1, 120));
      t_off = cells_t'((n % 11 == 5) ? 0 : $urandom_range(1, 200));
      first  = d ? t_on : t_off;
      second = d ? t_off : t_on;
      go = 1; @(negedge clk); go = 0;
      c1 = 0; while (u == d && c1 < 1000) begin @(negedge clk); c1++; end
      c2 = 0; while (!done && c2 < 1000) begin @(negedge clk); c2++; end
      // first interval: first cells of 2 clocks, +-1 clock of tick phase
      chk(c1 >= 2 * first && c1 <= 2 * first + 2, $sformatf("first interval %0d clocks for %0d cells", c1, first));
      chk(c2 >= 2 * second - 1 && c2 <= 2 * second + 2, $sformatf("second interval %0d clocks for %0d cells", c2, second));
      chk(u == !d, "final state");
      @(negedge clk); chk(!done, "done is one clock");
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
