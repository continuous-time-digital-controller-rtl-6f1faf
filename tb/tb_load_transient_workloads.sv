// Load-transient workloads of the controller, each on its own closed loop
// (converter_system, 5 V -> 1.8 V buck, 2.5 uH, 20 uF unless stated) at the
// controller's default parameters:
//   pid  : plain PID/DPWM regulator (CT-DSP disabled), 0.2 <-> 1.2 A
//   ct   : CT-DSP controller, 0.2 <-> 1.2 A
//   ct15 : CT-DSP controller, 0.2 <-> 1.5 A
//   c80  : CT-DSP controller with the output capacitor 20 % below the value
//          the look-up tables assume (16 uF), 0.2 <-> 1.2 A
//   esr  : CT-DSP controller with 35 mOhm capacitor ESR, 0.2 <-> 1.2 A
//   pide : PID regulator with the same 35 mOhm ESR (reference for esr)
// Each step runs 400 us. Checked:
//  * ct: one dynamic-mode entry, one sequence and one on/off action per
//    step; inductor current at the end of the sequence within 0.3 A of the
//    new load; smaller peak deviation and faster recovery (last excursion
//    beyond +-2 Vq) than pid;
//  * ct15: one action for the 0.2 -> 1.5 A step; for the 1.5 -> 0.2 A step
//    at most three actions; last sequence ends within 0.3 A of the load;
//  * c80: smaller peak deviation than pid and a last sequence ending within
//    0.3 A of the load, in both directions;
//  * esr: the 35 mOhm ESR adds about 40 mV of switching ripple at this
//    inductor, which reaches the dynamic-mode entry threshold, so the
//    controller re-enters dynamic mode every few periods. Checked only that
//    it stays bounded (deviation < 0.3 V, no mode time-out); the entry count
//    and deviations are printed next to pide. This is a known limitation.
//  * no mode time-out in any CT-DSP case.
// Peak deviations, recovery times and ratios are printed per step.
module tb_load_transient_workloads;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 1;
  real i_lo = 0.2, i_15 = 0.2;
  localparam real T_CLK = 20e-9;

  always #10 clk = ~clk;

  converter_system #(.CTDSP_EN(1'b0)) s_pid  (.clk(clk), .rst_n(rst_n), .i_load(i_lo), .clear(clear));
  converter_system                    s_ct   (.clk(clk), .rst_n(rst_n), .i_load(i_lo), .clear(clear));
  converter_system                    s_ct15 (.clk(clk), .rst_n(rst_n), .i_load(i_15), .clear(clear));
  converter_system #(.C_OUT(16e-6))   s_c80  (.clk(clk), .rst_n(rst_n), .i_load(i_lo), .clear(clear));
  converter_system #(.RESR(0.035))    s_esr  (.clk(clk), .rst_n(rst_n), .i_load(i_lo), .clear(clear));
  converter_system #(.RESR(0.035), .CTDSP_EN(1'b0)) s_pide (.clk(clk), .rst_n(rst_n), .i_load(i_lo), .clear(clear));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
    else $display("ok   %s", what);
  endtask

  function automatic real us(input longint c);
    return real'(c) * T_CLK * 1e6;
  endfunction

  task automatic step(input real lo, input real hi15, input string dir);
    @(negedge clk) clear = 1;
    @(negedge clk) begin clear = 0; i_lo = lo; i_15 = hi15; end
    repeat (20000) @(posedge clk);     // 400 us
    $display("---- %s: peak deviation, recovery, entries/sequences/toggles", dir);
    $display("  pid  %6.1f mV %6.1f us", s_pid.dev * 1e3, us(s_pid.t_last_out));
    $display("  ct   %6.1f mV %6.1f us  %0d/%0d/%0d  iL end %.3f A", s_ct.dev * 1e3, us(s_ct.t_last_out),
             s_ct.entries, s_ct.seqs, s_ct.toggles, s_ct.il_end);
    $display("  ct15 %6.1f mV %6.1f us  %0d/%0d/%0d  iL end %.3f A", s_ct15.dev * 1e3, us(s_ct15.t_last_out),
             s_ct15.entries, s_ct15.seqs, s_ct15.toggles, s_ct15.il_end);
    $display("  c80  %6.1f mV %6.1f us  %0d/%0d/%0d  iL end %.3f A", s_c80.dev * 1e3, us(s_c80.t_last_out),
             s_c80.entries, s_c80.seqs, s_c80.toggles, s_c80.il_end);
    $display("  esr  %6.1f mV %6.1f us  %0d/%0d/%0d", s_esr.dev * 1e3, us(s_esr.t_last_out),
             s_esr.entries, s_esr.seqs, s_esr.toggles);
    $display("  pide %6.1f mV %6.1f us", s_pide.dev * 1e3, us(s_pide.t_last_out));
    $display("  ratios pid/ct: deviation %.2f, recovery %.2f", s_pid.dev / s_ct.dev,
             real'(s_pid.t_last_out) / real'(s_ct.t_last_out));
    chk(s_ct.entries == 1 && s_ct.seqs == 1 && s_ct.toggles == 1, {dir, " ct: one on/off action"});
    chk((s_ct.il_end - lo) ** 2 < 0.09, $sformatf("%s ct: iL at sequence end %.3f A", dir, s_ct.il_end));
    chk(s_ct.dev < s_pid.dev, {dir, " ct: peak deviation below pid"});
    chk(s_ct.t_last_out < s_pid.t_last_out, {dir, " ct: recovery faster than pid"});
    if (hi15 > 1.0)
      chk(s_ct15.entries == 1 && s_ct15.seqs == 1 && s_ct15.toggles == 1, {dir, " ct15: one on/off action"});
    else
      chk(s_ct15.entries >= 1 && s_ct15.entries <= 3 && s_ct15.seqs == s_ct15.entries,
          {dir, " ct15: at most three actions, each completed"});
    chk((s_ct15.il_end - hi15) ** 2 < 0.09, $sformatf("%s ct15: iL at last sequence end %.3f A", dir, s_ct15.il_end));
    chk(s_c80.dev < s_pid.dev, {dir, " c80: peak deviation below pid"});
    chk(s_c80.seqs >= 1 && (s_c80.il_end - lo) ** 2 < 0.09,
        $sformatf("%s c80: iL at last sequence end %.3f A", dir, s_c80.il_end));
    chk(s_esr.dev < 0.3, {dir, " esr: deviation bounded"});
    chk(s_ct.timeouts + s_ct15.timeouts + s_c80.timeouts + s_esr.timeouts == 0, {dir, " no mode time-out"});
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (15000) @(posedge clk);     // 300 us start-up
    step(1.2, 1.5, "light-to-heavy");
    step(0.2, 0.2, "heavy-to-light");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
