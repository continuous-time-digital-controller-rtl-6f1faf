// Peak/valley detector of the CT-DSP: change detector, capture latches and
// b_i falling-edge detector.
//
// While `arm` (the mode signal m(t)) is high, the detector follows the
// comparators on the side of the transient (low side for a dip, high side for
// an overshoot) and remembers the deepest one set so far: the last comparator
// to set. The extreme point has passed when that comparator is the first to
// reset. At that clock the detector latches the comparator's delay-line value
// y_i* (N_max, the number of cells it stayed set, so the extreme lies N_max/2
// cells back), the number of thresholds crossed (the measured deviation in Vq
// steps) and pulses `st` for one clock. Only one peak is reported per arming;
// `arm` low clears the detector. Outputs are registered: `st`, `level` and
// `n_max` appear one clock after the comparator falls; `level` and `n_max`
// hold until the next detection.
module peak_detector
  import ctdc_pkg::*;
#(
  parameter int unsigned CELLS = 64,
  localparam int unsigned YW   = $clog2(CELLS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       arm,
  input  logic                       dip,    // 1: voltage dip, 0: overshoot
  input  logic [N_COMP-1:0]          comp,   // synchronised comparators
  input  logic [N_COMP-1:0][YW-1:0]  y,      // y_i* of each comparator
  output logic                       st,     // peak detected (one clock)
  output logic [2:0]                 level,  // thresholds crossed, 1..N_SIDE
  output logic [YW-1:0]              n_max   // N_max of the last comparator
);

  logic [N_SIDE-1:0] side, side_q;
  logic [2:0]        deepest, deepest_now;
  logic              found;
  logic              fall;
  logic [YW-1:0]     y_sel;

  // Comparators on the side of this transient, and the deepest set now.
  always_comb begin
    side        = dip ? comp[N_SIDE-1:0] : comp[N_COMP-1:N_SIDE];
    deepest_now = deepest;
    for (int k = 0; k < N_SIDE; k++)
      if (side[k] && 3'(k + 1) > deepest_now) deepest_now = 3'(k + 1);
  end

  // The last comparator to set falls: the extreme point is N_max/2 cells back.
  always_comb begin
    fall  = 1'b0;
    y_sel = '0;
    for (int k = 0; k < N_SIDE; k++) begin
      if (deepest == 3'(k + 1) && side_q[k] && !side[k]) begin
        fall  = 1'b1;
        y_sel = dip ? y[k] : y[N_SIDE + k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      side_q  <= '0;
      deepest <= '0;
      found   <= 1'b0;
      st      <= 1'b0;
      level   <= '0;
      n_max   <= '0;
    end else begin
      side_q <= side;
      st     <= 1'b0;
      if (!arm) begin
        deepest <= '0;
        found   <= 1'b0;
      end else if (!found) begin
        if (fall) begin
          found <= 1'b1;
          st    <= 1'b1;
          level <= deepest;
          n_max <= y_sel;
        end else begin
          deepest <= deepest_now;
        end
      end
    end
  end

endmodule
