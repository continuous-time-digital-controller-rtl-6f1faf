// End-to-end testbench of ct_digital_controller at its default parameters.
// Two controllers regulate two identical buck stage models (5 V to 1.8 V,
// 2.5 uH, 20 uF): one with the CT-DSP enabled, one as a plain PID/DPWM
// regulator. Both see a 0.2 A -> 1.2 A load step and later the 1.2 A ->
// 0.2 A step. Checked:
//  * steady-state regulation within two steps of Vref (50 mV, switching
//    ripple included) before each step, for both controllers;
//  * the plant switch is held open while reset is asserted, so a run does not
//    depend on the power-up value of the gate output;
//  * each step makes the CT-DSP enter dynamic mode once, detect one peak and
//    complete one sequence with a single switch toggle (one on/off action);
//  * at the end of the sequence the inductor current is close to the new
//    load (charge balance) and the output is within two steps of Vref;
//  * the CT-DSP peak deviation and recovery time (last excursion beyond
//    +-2 Vq) are smaller than the PID ones;
//  * mechanisms seen at least once: dip and overshoot entries, peak
//    detection, delay correction (N_max > 0), error correction of the
//    deviation (dv above the coarse level), PID duty updates; no timeout.
module tb_ct_digital_controller;
  import ctdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real  i_load = 0.2;
  localparam real VREF = 1.8, VQ = 0.025;
  localparam real T_CLK = 20e-9;

  // ---- CT-DSP controlled converter ------------------------------------------
  real v_a, il_a;
  logic [7:0] comp_a;
  logic gate_a, mode_a, st_a;
  err_t err_a;
  logic [6:0] duty_a, dlp_a;
  cells_t ton_a, toff_a;
  logic to_a;

  buck_model plant_a (.clk(clk), .gate(gate_a && rst_n), .i_load(i_load), .vout(v_a), .i_l(il_a));
  comparator_window_model cmp_a (.v(v_a), .comp(comp_a));
  ct_digital_controller dut (.clk(clk), .rst_n(rst_n), .comp(comp_a), .ctdsp_en(1'b1),
    .gate(gate_a), .mode(mode_a), .st(st_a), .err(err_a), .duty(duty_a), .duty_lp(dlp_a),
    .t_on(ton_a), .t_off(toff_a), .timed_out(to_a));

  // ---- PID-only converter ----------------------------------------------------
  real v_b, il_b;
  logic [7:0] comp_b;
  logic gate_b, mode_b, st_b;
  err_t err_b;
  logic [6:0] duty_b, dlp_b;
  cells_t ton_b, toff_b;
  logic to_b;

  buck_model plant_b (.clk(clk), .gate(gate_b && rst_n), .i_load(i_load), .vout(v_b), .i_l(il_b));
  comparator_window_model cmp_b (.v(v_b), .comp(comp_b));
  ct_digital_controller ref_pid (.clk(clk), .rst_n(rst_n), .comp(comp_b), .ctdsp_en(1'b0),
    .gate(gate_b), .mode(mode_b), .st(st_b), .err(err_b), .duty(duty_b), .duty_lp(dlp_b),
    .t_on(ton_b), .t_off(toff_b), .timed_out(to_b));

  always #10 clk = ~clk;

  // ---- event counters ---------------------------------------------------------
  int n_enter_dip = 0, n_enter_ovs = 0, n_st = 0, n_done = 0, n_toggle = 0;
  int n_dt_corr = 0, n_dv_corr = 0, n_duty_upd = 0, n_timeout = 0, n_mode_b = 0;
  logic gate_q = 0, mode_q = 0;
  logic [6:0] duty_q = 0;
  real dev_a = 0, dev_b = 0;
  longint cyc = 0, last_out_a = 0, last_out_b = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    gate_q <= gate_a; mode_q <= mode_a; duty_q <= duty_a;
    if (dut.enter && dut.dip)  n_enter_dip++;
    if (dut.enter && !dut.dip) n_enter_ovs++;
    if (st_a) n_st++;
    if (st_a && dut.n_max > 0) n_dt_corr++;
    if (dut.u_calc.s1_valid && dut.u_calc.s1_dv > 8'(dut.level) << DV_FRAC) n_dv_corr++;
    if (dut.seq_done) n_done++;
    if (mode_a && mode_q && gate_a != gate_q) n_toggle++;
    if (to_a) n_timeout++;
    if (rst_n && duty_a != duty_q && !mode_a) n_duty_upd++;
    if (mode_b) n_mode_b++;
    if ((v_a - VREF) ** 2 > dev_a ** 2) dev_a = (v_a > VREF) ? v_a - VREF : VREF - v_a;
    if ((v_b - VREF) ** 2 > dev_b ** 2) dev_b = (v_b > VREF) ? v_b - VREF : VREF - v_b;
    if ((v_a - VREF) ** 2 > 4 * VQ * VQ) last_out_a <= cyc;
    if ((v_b - VREF) ** 2 > 4 * VQ * VQ) last_out_b <= cyc;
  end

  // inductor current / voltage at the end of each sequence
  real il_end, v_end;
  always @(posedge clk) if (dut.seq_done) begin il_end = il_a; v_end = v_a; end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
    else $display("ok   %s", what);
  endtask

  task automatic check_steady(input string what);
    real lo, hi;
    lo = 9; hi = 0;
    repeat (5000) begin
      @(posedge clk);
      if (v_a < lo) lo = v_a;
      if (v_a > hi) hi = v_a;
      if (v_b < lo) lo = v_b;
      if (v_b > hi) hi = v_b;
    end
    chk(lo > VREF - 2 * VQ && hi < VREF + 2 * VQ, $sformatf("%s: steady band %.4f..%.4f V", what, lo, hi));
  endtask

  task automatic transient(input real new_load, input string what);
    int e0, s0, d0, t0;
    longint c0;
    e0 = n_enter_dip + n_enter_ovs; s0 = n_st; d0 = n_done; t0 = n_toggle;
    dev_a = 0; dev_b = 0;
    c0 = cyc;
    @(negedge clk) i_load = new_load;
    repeat (25000) @(posedge clk);      // 500 us
    chk(n_enter_dip + n_enter_ovs - e0 == 1, $sformatf("%s: one dynamic-mode entry", what));
    chk(n_st - s0 == 1, $sformatf("%s: one peak detection", what));
    chk(n_done - d0 == 1, $sformatf("%s: one completed sequence", what));
    chk(n_toggle - t0 == 1, $sformatf("%s: single on/off action (t_on=%0d t_off=%0d cells)", what, ton_a, toff_a));
    chk((il_end - new_load) ** 2 < 0.3 ** 2,
        $sformatf("%s: iL at sequence end %.3f A vs load %.3f A", what, il_end, new_load));
    chk((v_end - VREF) ** 2 < (2 * VQ) ** 2, $sformatf("%s: v at sequence end %.4f V", what, v_end));
    chk(dev_a < dev_b, $sformatf("%s: peak deviation CT-DSP %.1f mV < PID %.1f mV", what, dev_a * 1e3, dev_b * 1e3));
    chk(last_out_a - c0 < last_out_b - c0, $sformatf("%s: recovery (last excursion beyond +-2 Vq) CT-DSP %.1f us < PID %.1f us", what,
        real'(last_out_a - c0) * T_CLK * 1e6, real'(last_out_b - c0) * T_CLK * 1e6));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (15000) @(posedge clk);       // 300 us start-up
    check_steady("light load");
    transient(1.2, "0.2->1.2 A");
    check_steady("heavy load");
    transient(0.2, "1.2->0.2 A");
    check_steady("light load again");
    chk(n_enter_dip >= 1, $sformatf("dip entries %0d", n_enter_dip));
    chk(n_enter_ovs >= 1, $sformatf("overshoot entries %0d", n_enter_ovs));
    chk(n_dt_corr >= 1, $sformatf("delay corrections %0d", n_dt_corr));
    chk(n_dv_corr >= 1, $sformatf("deviation corrections %0d", n_dv_corr));
    chk(n_duty_upd >= 1, $sformatf("PID duty updates %0d", n_duty_upd));
    chk(n_timeout == 0, $sformatf("timeouts %0d", n_timeout));
    chk(n_mode_b == 0, "PID-only controller never leaves PID mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
