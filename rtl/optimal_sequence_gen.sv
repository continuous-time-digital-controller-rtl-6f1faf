// Optimal sequence generator: switching selector, SR latch and the ON and
// OFF programmable delay lines producing u(t).
//
// On `enter` the switching selector sets the latch (dip: Q1 on) or resets it
// (overshoot: Q1 off). When the optimal times arrive (`go`, the delayed peak
// detection st), a step is launched into the delay line of the first
// interval: the ON line, tapped at t_on, after a dip; the OFF line, tapped at
// t_off, after an overshoot. When the step reaches the tap the latch toggles
// and a step is launched into the other line; when that one reaches its tap
// the sequence is complete (`done` pulses for one clock) and the lines clear.
// The delay lines are tapped chains of SEQ_CELLS flip-flops advanced by the
// cell tick (T = 40 ns), so a time of n cells lasts n ticks; a tap of 0
// passes the step straight through. The chain length is this design's
// choice. u is registered.
module optimal_sequence_gen
  import ctdc_pkg::*;
#(
  parameter int unsigned SEQ_CELLS = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick,
  input  logic   enter,
  input  logic   dip,
  input  logic   go,
  input  cells_t t_on,
  input  cells_t t_off,
  output logic   u,
  output logic   done
);

  typedef enum logic [1:0] {IDLE, FIRST, SECOND} phase_e;

  phase_e            phase;
  logic              seq_dip;
  cells_t            tap_on, tap_off;
  logic [SEQ_CELLS-1:0] line_on, line_off;
  logic              in_on, in_off, out_on, out_off;
  logic              out_first, out_second;

  // Steps entering each line: the first line runs from go, the second from
  // the end of the first.
  assign in_on  = seq_dip ? (phase != IDLE) : (phase == SECOND);
  assign in_off = seq_dip ? (phase == SECOND) : (phase != IDLE);

  assign out_on  = (tap_on  == '0) ? in_on  : line_on [tap_on  - 1'b1];
  assign out_off = (tap_off == '0) ? in_off : line_off[tap_off - 1'b1];

  assign out_first  = seq_dip ? out_on  : out_off;
  assign out_second = seq_dip ? out_off : out_on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_on  <= '0;
      line_off <= '0;
    end else if (phase == IDLE) begin
      line_on  <= '0;
      line_off <= '0;
    end else if (tick) begin
      line_on  <= {line_on [SEQ_CELLS-2:0], in_on};
      line_off <= {line_off[SEQ_CELLS-2:0], in_off};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= IDLE;
      seq_dip <= 1'b0;
      tap_on  <= '0;
      tap_off <= '0;
      u       <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (enter) begin
        u       <= dip;          // switching selector: set or reset the latch
        seq_dip <= dip;
        phase   <= IDLE;
      end else begin
        case (phase)
          IDLE: if (go) begin
            phase   <= FIRST;
            tap_on  <= t_on;
            tap_off <= t_off;
          end
          FIRST: if (out_first) begin
            phase <= SECOND;
            u     <= ~u;
          end
          default: if (out_second) begin
            phase <= IDLE;
            done  <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
