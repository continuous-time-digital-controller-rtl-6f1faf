// Error encoder: windowed flash ADC thermometer code -> signed error e*(t).
//
// The eight comparators of the window give, on each side of the reference, a
// thermometer code. The error is the number of thresholds crossed, positive
// when the output voltage is below Vref (the sign the PID needs) and negative
// above it, so e = Vref - v in quantisation steps, range -N_SIDE..+N_SIDE.
// The highest asserted comparator on a side sets the code, so a bubble in the
// thermometer code cannot lower it. If both sides claim a crossing (not a
// physical state) the low side wins. Purely combinational: the code follows
// the comparators with no clock, which is the binary-weighted e*(t) that the
// PID compensator samples once per switching period.
module error_encoder
  import ctdc_pkg::*;
(
  input  logic [N_COMP-1:0] comp,  // [N_SIDE-1:0] low side, [N_COMP-1:N_SIDE] high side
  output err_t              err
);

  logic [2:0] lo_lvl, hi_lvl;

  always_comb begin
    lo_lvl = '0;
    hi_lvl = '0;
    for (int k = 0; k < N_SIDE; k++) begin
      if (comp[k])          lo_lvl = 3'(k + 1);
      if (comp[N_SIDE + k]) hi_lvl = 3'(k + 1);
    end
    if (lo_lvl != 0)      err = err_t'(lo_lvl);
    else if (hi_lvl != 0) err = -err_t'(hi_lvl);
    else                  err = '0;
  end

endmodule
