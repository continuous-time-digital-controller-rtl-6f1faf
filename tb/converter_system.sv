// Closed-loop test fixture: buck stage model + comparator window model +
// ct_digital_controller (default parameters), with measurement of one load
// transient. `clear` restarts the measurement; afterwards the fixture keeps
// the peak output deviation, the time of the last excursion beyond
// +-2 Vq (recovery), the number of dynamic-mode entries, completed sequences
// and mode time-outs, the number of switch toggles during dynamic mode, and
// the inductor current and output voltage at the end of the last sequence,
// plus the highest and lowest output voltage in the 40 us after it. The
// plant switch is held open while reset is asserted.
module converter_system #(
  parameter real C_OUT    = 20e-6,
  parameter real RESR     = 0.0,
  parameter bit  CTDSP_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  real  i_load,
  input  logic clear
);
  import ctdc_pkg::*;
  localparam real VREF = 1.8, VQ = 0.025;

  real v, il;
  logic [7:0] comp;
  logic gate, mode, st;
  err_t err;
  logic [6:0] duty, dlp;
  cells_t t_on, t_off;
  logic timed_out;

  buck_model #(.C(C_OUT), .RESR(RESR)) plant (.clk(clk), .gate(gate && rst_n), .i_load(i_load), .vout(v), .i_l(il));
  comparator_window_model cmp (.v(v), .comp(comp));
  ct_digital_controller dut (.clk(clk), .rst_n(rst_n), .comp(comp), .ctdsp_en(CTDSP_EN),
    .gate(gate), .mode(mode), .st(st), .err(err), .duty(duty), .duty_lp(dlp),
    .t_on(t_on), .t_off(t_off), .timed_out(timed_out));

  real    dev, v_end, il_end, v_after_max, v_after_min;
  longint cyc, t_last_out, t_end;
  int     entries, seqs, toggles, timeouts;
  logic   gate_q, mode_q;

  always @(posedge clk) begin
    real d;
    gate_q <= gate;
    mode_q <= mode;
    d = (v > VREF) ? v - VREF : VREF - v;
    if (clear || !rst_n) begin
      cyc = 0; dev = 0; t_last_out = 0; entries = 0; seqs = 0; toggles = 0; timeouts = 0; t_end = -1;
      v_end = VREF; il_end = 0; v_after_max = VREF; v_after_min = VREF;
    end else begin
      cyc++;
      if (d > dev) dev = d;
      if (d > 2.0 * VQ) t_last_out = cyc;
      if (dut.enter) entries++;
      if (timed_out) timeouts++;
      if (mode && mode_q && gate != gate_q) toggles++;
      if (dut.seq_done) begin
        seqs++; v_end = v; il_end = il; t_end = cyc; v_after_max = v; v_after_min = v;
      end else if (t_end >= 0 && cyc - t_end < 2000) begin
        if (v > v_after_max) v_after_max = v;
        if (v < v_after_min) v_after_min = v;
      end
    end
  end
endmodule
