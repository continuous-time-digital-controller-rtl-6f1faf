// Digital PID compensator of the steady-state regulation loop.
//
// Once per switching period (`en`) it applies the incremental law
//   d[n] = d[n-1] + A e[n] + B e[n-1] + C e[n-2]
// to the error code e (Vref - v in 25 mV steps). d is kept with eight
// fractional bits and clamped to 0..PERIOD counts; `duty` is its integer
// part for the DPWM. The coefficients are in the same Q8 format; their
// values were chosen for a 2.5 uH / 20 uF, 5 V to 1.8 V buck stage (the
// control law is the document's, the numbers are not). While `hold` is high
// (the CT-DSP drives the switch) the compensator keeps its state, so
// regulation resumes from the pre-transient duty. Output is registered.
module pid_compensator
  import ctdc_pkg::*;
#(
  parameter int          PERIOD = 125,
  parameter int          A      = 2800,
  parameter int          B      = -4300,
  parameter int          C      = 1800,
  parameter int          D_INIT = 45,
  localparam int unsigned DW    = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          hold,
  input  err_t          err,
  output logic [DW-1:0] duty
);

  localparam int ACC_MAX = PERIOD * 256;

  logic signed [23:0] acc, nxt;
  err_t               e1, e2;

  always_comb begin
    nxt = acc + 24'(A * err) + 24'(B * e1) + 24'(C * e2);
    if (nxt < 0)                    nxt = '0;
    else if (nxt > 24'(ACC_MAX))    nxt = 24'(ACC_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= 24'(D_INIT * 256);
      e1  <= '0;
      e2  <= '0;
    end else if (en && !hold) begin
      acc <= nxt;
      e1  <= err;
      e2  <= e1;
    end
  end

  assign duty = DW'(acc >>> 8);

endmodule
