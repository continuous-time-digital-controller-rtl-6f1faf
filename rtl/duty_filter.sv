// Low-pass filter of the PID duty command, giving the steady-state duty
// ratio D used by the optimal time calculator.
//
// First-order IIR, updated once per switching period on `en`:
// acc += (d_in*2^8 - acc) / 2^SHIFT, with eight fractional bits kept in
// the accumulator. The output is the rounded integer part, in DPWM counts.
// The filter form, its time constant (2^SHIFT periods) and the reset value
// D_INIT (the nominal 1.8 V / 5 V duty) are this design's choices; the
// filtering itself follows the CT-DSP architecture. Output is registered.
module duty_filter #(
  parameter int unsigned PERIOD = 125,
  parameter int unsigned SHIFT  = 4,
  parameter int unsigned D_INIT = 45,
  localparam int unsigned DW    = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] d_in,
  output logic [DW-1:0] d_lp
);

  logic signed [DW+9:0] acc, diff;

  assign diff = $signed({2'b00, d_in, 8'h00}) - acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= $signed((DW+10)'(D_INIT) <<< 8);
    else if (en) acc <= acc + (diff >>> SHIFT);
  end

  // Round to the nearest count; acc never exceeds PERIOD*2^8, so the top
  // bits of the sum are always zero and the cast drops them.
  assign d_lp = DW'(($unsigned(acc) + (DW+10)'(128)) >> 8);

endmodule
