// Behavioural model of the windowed flash ADC (not synthesizable): eight
// ideal continuous-time comparators around the reference. comp[k] is high
// while v < VREF - (k+1)*VQ and comp[4+k] while v > VREF + (k+1)*VQ, k = 0..3.
module comparator_window_model #(
  parameter real VREF = 1.8,
  parameter real VQ   = 0.025
) (
  input  real        v,
  output logic [7:0] comp
);
  always_comb
    for (int k = 0; k < 4; k++) begin
      comp[k]     = (v < VREF - (k + 1) * VQ);
      comp[4 + k] = (v > VREF + (k + 1) * VQ);
    end
endmodule
