// Testbench of optimal_time_calc: for random peak measurements (level, N_max),
// transient types and filtered duty ratios it recomputes the optimal times in
// floating point from the physical formulas (eqs. 7-9 with L = 2.5 uH,
// C = 20 uF, Vout = 1.8 V, Vq = 25 mV, T = 40 ns) and checks the RTL within
// 2 cells, plus the two-clock latency of `valid`. The first interval also
// loses the LAT_CELLS = 2 cells of fixed pipeline latency. A second instance
// with ESR compensation (TAU_ESR_CELLS = 5) must lengthen the first interval
// by 5 cells, where it is not clipped at zero, and leave the second one alone.
module tb_optimal_time_calc;
  import ctdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, dip = 0;
  logic [2:0] level = 0;
  logic [6:0] n_max = 0, d_lp = 45;
  logic valid;
  cells_t t_on, t_off;
  logic valid_e;
  cells_t t_on_e, t_off_e;

  optimal_time_calc dut (.clk(clk), .rst_n(rst_n), .start(start), .dip(dip), .level(level),
                         .n_max(n_max), .d_lp(d_lp), .valid(valid), .t_on(t_on), .t_off(t_off));
  optimal_time_calc #(.TAU_ESR_CELLS(5)) dut_esr (.clk(clk), .rst_n(rst_n), .start(start), .dip(dip),
                         .level(level), .n_max(n_max), .d_lp(d_lp), .valid(valid_e),
                         .t_on(t_on_e), .t_off(t_off_e));

  always #10 clk = ~clk;

  localparam real L = 2.5e-6, C = 20e-6, VOUT = 1.8, VQ = 0.025, T = 40e-9;

  function automatic real clampr(input real x, input real lo, input real hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      real D, dt, dverr, dv, k1, ton, toff;
      int lat;
      @(negedge clk);
      dip   = $urandom_range(0, 1);
      level = 3'($urandom_range(1, 4));
      n_max = 7'($urandom_range(0, 64));
      d_lp  = 7'($urandom_range(25, 90));
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!valid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      D     = real'(d_lp) / 125.0;
      dt    = real'(n_max) * T / 2.0;
      dverr = dip ? (VOUT / (2 * L * C)) * (1 - D) / D * dt * dt : (VOUT / (2 * L * C)) * dt * dt;
      dv    = clampr(level * VQ + dverr, 0, 255.0 * VQ / 16);
      k1    = $sqrt(2 * L * C / VOUT);
      ton   = k1 * D / $sqrt(1 - D) * $sqrt(dv) / T;
      toff  = k1 * $sqrt(1 - D) * $sqrt(dv) / T;
      if (dip) ton  = clampr(ton  - real'(n_max) / 2.0 - 2.0, 0, 255);
      else     toff = clampr(toff - real'(n_max) / 2.0 - 2.0, 0, 255);
      ton = clampr(ton, 0, 255); toff = clampr(toff, 0, 255);
      checks++;
      if ((real'(t_on) - ton) ** 2 > 4.0 || (real'(t_off) - toff) ** 2 > 4.0) begin
        failures++;
        $display("FAIL dip=%0d lvl=%0d n=%0d d=%0d: t_on=%0d (%f) t_off=%0d (%f)",
                 dip, level, n_max, d_lp, t_on, ton, t_off, toff);
      end
      // ESR-compensated instance: first interval 5 cells longer unless the
      // uncompensated one was clipped at 0 or at the maximum.
      checks++;
      if (!valid_e ||
          (dip  ? (t_off_e != t_off || (t_on  > 0 && t_on  < 250 && int'(t_on_e)  != int'(t_on)  + 5))
                : (t_on_e  != t_on  || (t_off > 0 && t_off < 250 && int'(t_off_e) != int'(t_off) + 5)))) begin
        failures++;
        $display("FAIL esr dip=%0d: t_on %0d -> %0d, t_off %0d -> %0d", dip, t_on, t_on_e, t_off, t_off_e);
      end
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
