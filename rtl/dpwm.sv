// Counter-based digital pulse-width modulator producing c(t).
//
// A free-running counter counts 0..PERIOD-1 clocks; c is high while the
// count is below the duty command, which is taken at the start of every
// period (trailing-edge modulation). With the default 50 MHz clock and
// PERIOD = 125 the switching frequency is the prototype's 400 kHz and one
// duty count is 1/125 of the period. `period_end` is high in the last clock
// of each period: the PID samples the error and updates on it, and the DPWM
// takes the new duty one clock later, so a new duty acts in the very next
// period. `sync` (the end of a CT-DSP switching sequence) moves the counter
// to the point of the period where the inductor current of a steady PWM
// waveform crosses its average, so that regulation resumes without a current
// step: the middle of the off time when the sequence ended with the switch
// off (`sync_off` = 1, after a dip), the middle of the on time otherwise.
// The DPWM structure and this phase alignment are this design's choices.
// c(t) is registered.
module dpwm #(
  parameter int unsigned PERIOD = 125,
  localparam int unsigned DW    = $clog2(PERIOD + 1),
  localparam int unsigned CW    = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] duty,
  input  logic          sync,
  input  logic          sync_off,
  output logic          c,
  output logic          period_end
);

  logic [CW-1:0] cnt;
  logic [DW-1:0] duty_q;

  logic [CW-1:0] sync_cnt;
  always_comb begin
    if (sync_off) sync_cnt = CW'((PERIOD + int'(duty_q)) / 2);  // middle of the off time
    else          sync_cnt = CW'(duty_q / 2);             // middle of the on time
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
      c      <= 1'b0;
    end else if (sync) begin
      cnt    <= (sync_cnt == CW'(PERIOD - 1)) ? '0 : sync_cnt + 1'b1;
      c      <= (DW'(sync_cnt) < duty_q);
    end else begin
      if (cnt == CW'(PERIOD - 1)) cnt <= '0;
      else                        cnt <= cnt + 1'b1;
      if (cnt == '0) begin
        duty_q <= duty;
        c      <= (duty != '0);
      end else begin
        c      <= (DW'(cnt) < duty_q);
      end
    end
  end

  assign period_end = (cnt == CW'(PERIOD - 1));

endmodule
