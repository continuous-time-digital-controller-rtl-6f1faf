// Sensitivity of the CT-DSP recovery to the instant of the load step within
// the switching period. Eight pairs of closed loops (converter_system,
// default controller parameters), each pair one CT-DSP loop and one
// PID-only loop, see the same 0.2 A -> 1.2 A step and later the 1.2 A ->
// 0.2 A step, each pair delayed by a further 16 clocks (1/8 of the 125-clock
// period), so together they cover the whole period. For every phase and
// direction it checks that the CT-DSP loop enters dynamic mode, completes
// its sequences without a mode time-out, that its last sequence ends with the
// inductor current within 0.3 A of the new load. It counts the phases whose
// peak deviation is below that of the PID-only loop stepped at the same
// instant (at least six of eight must be) and the phases recovered in a
// single on/off action (at least a quarter must be), and prints both per
// phase. Some heavy-to-light phases overshoot for longer than the 64-cell
// lines can time; N_max then saturates and the sequence is mis-sized. Extra actions come
// from the hand-back: the PID restarts from the pre-transient duty, which
// misses the loss-dependent change of the steady-state duty, and the output
// can drift back over the entry threshold before the PID has caught up.
module tb_step_phase_sweep;
  localparam int NPH = 8;
  localparam int STEP_CLK = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 1;
  real i_load [NPH];

  always #10 clk = ~clk;

  for (genvar k = 0; k < NPH; k++) begin : g_ph
    converter_system s (.clk(clk), .rst_n(rst_n), .i_load(i_load[k]), .clear(clear));
    converter_system #(.CTDSP_EN(1'b0)) p (.clk(clk), .rst_n(rst_n), .i_load(i_load[k]), .clear(clear));
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Apply the new load to phase k after k*STEP_CLK clocks.
  task automatic step(input real target, input string dir);
    int ent[NPH], seqs[NPH], tog[NPH], tmo[NPH];
    real dev[NPH], il[NPH], pdev[NPH];
    int single, better;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int k = 0; k < NPH; k++) begin
      i_load[k] = target;
      repeat (STEP_CLK) @(negedge clk);
    end
    repeat (20000) @(posedge clk);     // 400 us
    ent[0] = g_ph[0].s.entries; seqs[0] = g_ph[0].s.seqs; tog[0] = g_ph[0].s.toggles; tmo[0] = g_ph[0].s.timeouts; dev[0] = g_ph[0].s.dev; il[0] = g_ph[0].s.il_end; pdev[0] = g_ph[0].p.dev;
    ent[1] = g_ph[1].s.entries; seqs[1] = g_ph[1].s.seqs; tog[1] = g_ph[1].s.toggles; tmo[1] = g_ph[1].s.timeouts; dev[1] = g_ph[1].s.dev; il[1] = g_ph[1].s.il_end; pdev[1] = g_ph[1].p.dev;
    ent[2] = g_ph[2].s.entries; seqs[2] = g_ph[2].s.seqs; tog[2] = g_ph[2].s.toggles; tmo[2] = g_ph[2].s.timeouts; dev[2] = g_ph[2].s.dev; il[2] = g_ph[2].s.il_end; pdev[2] = g_ph[2].p.dev;
    ent[3] = g_ph[3].s.entries; seqs[3] = g_ph[3].s.seqs; tog[3] = g_ph[3].s.toggles; tmo[3] = g_ph[3].s.timeouts; dev[3] = g_ph[3].s.dev; il[3] = g_ph[3].s.il_end; pdev[3] = g_ph[3].p.dev;
    ent[4] = g_ph[4].s.entries; seqs[4] = g_ph[4].s.seqs; tog[4] = g_ph[4].s.toggles; tmo[4] = g_ph[4].s.timeouts; dev[4] = g_ph[4].s.dev; il[4] = g_ph[4].s.il_end; pdev[4] = g_ph[4].p.dev;
    ent[5] = g_ph[5].s.entries; seqs[5] = g_ph[5].s.seqs; tog[5] = g_ph[5].s.toggles; tmo[5] = g_ph[5].s.timeouts; dev[5] = g_ph[5].s.dev; il[5] = g_ph[5].s.il_end; pdev[5] = g_ph[5].p.dev;
    ent[6] = g_ph[6].s.entries; seqs[6] = g_ph[6].s.seqs; tog[6] = g_ph[6].s.toggles; tmo[6] = g_ph[6].s.timeouts; dev[6] = g_ph[6].s.dev; il[6] = g_ph[6].s.il_end; pdev[6] = g_ph[6].p.dev;
    ent[7] = g_ph[7].s.entries; seqs[7] = g_ph[7].s.seqs; tog[7] = g_ph[7].s.toggles; tmo[7] = g_ph[7].s.timeouts; dev[7] = g_ph[7].s.dev; il[7] = g_ph[7].s.il_end; pdev[7] = g_ph[7].p.dev;
    single = 0; better = 0;
    for (int k = 0; k < NPH; k++) begin
      $display("%s phase %0d/8: %0d action(s), peak deviation %5.1f mV (PID %5.1f mV), iL at last sequence end %.3f A",
               dir, k, tog[k], dev[k] * 1e3, pdev[k] * 1e3, il[k]);
      if (ent[k] == 1 && seqs[k] == 1 && tog[k] == 1) single++;
      chk(ent[k] >= 1 && seqs[k] == ent[k] && tmo[k] == 0, $sformatf("%s phase %0d: sequences complete, no time-out", dir, k));
      chk((il[k] - target) ** 2 < 0.09, $sformatf("%s phase %0d: iL at last sequence end %.3f A", dir, k, il[k]));
      if (dev[k] < pdev[k]) better++;
    end
    $display("%s: %0d of %0d phases recovered in a single on/off action, %0d of %0d with less deviation than PID",
             dir, single, NPH, better, NPH);
    chk(4 * better >= 3 * NPH, $sformatf("%s: CT-DSP deviation below PID in at least 6 of 8 phases", dir));
    chk(4 * single >= NPH, $sformatf("%s: at least a quarter of the phases need one action", dir));
  endtask

  initial begin
    for (int k = 0; k < NPH; k++) i_load[k] = 0.2;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (15000) @(posedge clk);     // 300 us start-up
    step(1.2, "0.2->1.2 A");
    step(0.2, "1.2->0.2 A");
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
