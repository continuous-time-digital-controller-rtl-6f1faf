// Continuous-time digital controller for a high-frequency buck converter.
//
// Two regulation modes share one gate-drive output:
//  * Steady state: the windowed flash ADC error e*(t) feeds an incremental
//    PID compensator that updates the DPWM duty once per switching period;
//    the DPWM produces c(t).
//  * Transients: as soon as the output leaves the window by ENTER_LEVEL
//    steps, mode control raises m(t) and the switch is turned on (dip) or off
//    (overshoot) immediately. The CT-DSP then measures the extreme point of
//    the deviation from the comparator edges alone: one delay line per
//    comparator turns the time the deepest comparator stayed set into N_max,
//    the peak detector latches it when that comparator resets, and the
//    optimal time calculator applies capacitor charge balance (with error
//    correction of the coarse quantisation) to get t_on and t_off. The
//    optimal sequence generator completes one on/off action u(t), after
//    which control returns to the PID.
//
// Interface: `comp` are the raw, asynchronous outputs of the eight window
// comparators (bits 3:0 trip below Vref - k*Vq, bits 7:4 above Vref + k*Vq,
// k = 1..4, Vq = 25 mV); they pass a two-flop synchroniser (one cell of
// latency). `gate` drives Q1 (1 = on). `ctdsp_en` = 0 leaves the plain PID
// regulator. The other outputs expose the internal signals observed on the
// prototype: m(t), st(t), e*(t), the duty and filtered duty, and the last
// computed times. `timed_out` pulses if dynamic mode had to be abandoned
// because no sequence completed (a safeguard of this design).
//
// Timing: one clock is 20 ns at the default 50 MHz; a delay cell lasts
// CELL_DIV clocks (40 ns, as in the prototype's delay lines) and a
// switching period PERIOD clocks (400 kHz, as in the prototype). The clock,
// the synchroniser and the synchronous realisation of the delay cells are
// this design's choices; the partition into blocks follows the document.
module ct_digital_controller
  import ctdc_pkg::*;
#(
  parameter int unsigned PERIOD      = 125,
  parameter int unsigned CELL_DIV    = 2,
  parameter int unsigned CELLS       = 64,
  parameter int unsigned SEQ_CELLS   = 256,
  parameter int unsigned ENTER_LEVEL = 2,
  parameter int unsigned K1_Q8       = 1886,
  parameter int unsigned K2_Q16      = 1208,
  parameter int          PID_A       = 2800,
  parameter int          PID_B       = -4300,
  parameter int          PID_C       = 1800,
  parameter int unsigned D_INIT      = 45,
  parameter int unsigned TAU_ESR_CELLS = 0,   // ESR compensation, cells (0: off)
  localparam int unsigned DW         = $clog2(PERIOD + 1),
  localparam int unsigned YW         = $clog2(CELLS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_COMP-1:0] comp,
  input  logic              ctdsp_en,
  output logic              gate,
  output logic              mode,
  output logic              st,
  output err_t              err,
  output logic [DW-1:0]     duty,
  output logic [DW-1:0]     duty_lp,
  output cells_t            t_on,
  output cells_t            t_off,
  output logic              timed_out
);

  // ---- comparator synchroniser and delay-cell time base ----------------------
  logic [N_COMP-1:0] comp_m, comp_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_m <= '0;
      comp_s <= '0;
    end else begin
      comp_m <= comp;
      comp_s <= comp_m;
    end
  end

  logic [$clog2(CELL_DIV+1)-1:0] div;
  logic tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               div <= '0;
    else if (div == ($bits(div))'(CELL_DIV - 1)) div <= '0;
    else                                      div <= div + 1'b1;
  end
  assign tick = (div == '0);

  // ---- steady-state loop: error encoder, PID, DPWM, duty filter --------------
  logic c_pwm, period_end;
  logic dip, enter, seq_done;

  error_encoder u_err (.comp(comp_s), .err(err));

  pid_compensator #(
    .PERIOD(PERIOD), .A(PID_A), .B(PID_B), .C(PID_C), .D_INIT(D_INIT)
  ) u_pid (
    .clk(clk), .rst_n(rst_n), .en(period_end), .hold(mode), .err(err), .duty(duty)
  );

  dpwm #(.PERIOD(PERIOD)) u_dpwm (
    .clk(clk), .rst_n(rst_n), .duty(duty), .sync(seq_done), .sync_off(dip),
    .c(c_pwm), .period_end(period_end)
  );

  duty_filter #(.PERIOD(PERIOD), .D_INIT(D_INIT)) u_dfilt (
    .clk(clk), .rst_n(rst_n), .en(period_end), .d_in(duty), .d_lp(duty_lp)
  );

  // ---- mode control ------------------------------------------------------------

  mode_control #(.ENTER_LEVEL(ENTER_LEVEL)) u_mode (
    .clk(clk), .rst_n(rst_n), .enable(ctdsp_en), .err(err), .seq_done(seq_done),
    .mode(mode), .dip(dip), .enter(enter), .timed_out(timed_out)
  );

  // ---- CT-DSP: delay lines, peak detector, optimal time calculator ----------
  logic [N_COMP-1:0][YW-1:0] y;

  for (genvar i = 0; i < N_COMP; i++) begin : g_tdc
    tdc_delay_line #(.CELLS(CELLS)) u_tdc (
      .clk(clk), .rst_n(rst_n), .tick(tick), .b(comp_s[i]), .y(y[i])
    );
  end

  logic [2:0]    level;
  logic [YW-1:0] n_max;

  peak_detector #(.CELLS(CELLS)) u_peak (
    .clk(clk), .rst_n(rst_n), .arm(mode), .dip(dip), .comp(comp_s), .y(y),
    .st(st), .level(level), .n_max(n_max)
  );

  logic go;

  optimal_time_calc #(
    .PERIOD(PERIOD), .CELLS(CELLS), .K1_Q8(K1_Q8), .K2_Q16(K2_Q16),
    .TAU_ESR_CELLS(TAU_ESR_CELLS)
  ) u_calc (
    .clk(clk), .rst_n(rst_n), .start(st), .dip(dip), .level(level), .n_max(n_max),
    .d_lp(duty_lp), .valid(go), .t_on(t_on), .t_off(t_off)
  );

  // ---- optimal sequence generator and gate select ----------------------------
  logic u;

  optimal_sequence_gen #(.SEQ_CELLS(SEQ_CELLS)) u_seq (
    .clk(clk), .rst_n(rst_n), .tick(tick), .enter(enter), .dip(dip), .go(go),
    .t_on(t_on), .t_off(t_off), .u(u), .done(seq_done)
  );

  assign gate = mode ? u : c_pwm;

endmodule
