// Behavioural model of the synchronous buck power stage (not synthesizable):
// Q1/Q2 switch node, inductor L, output capacitor C with series resistance
// RESR and a load current source. Forward-Euler integration once per clock
// of DT seconds: iL += (gate*VG - vout - RS*iL)/L*DT, vc += (iL - i_load)/C*DT,
// vout = vc + RESR*(iL - i_load). RS lumps the inductor winding and switch
// resistances. Starts at VREF and I_INIT. Default component values (2.5 uH,
// 20 uF, 50 mOhm) are an assumed design for the 5 V to 1.8 V, 400 kHz
// converter.
module buck_model #(
  parameter real L      = 2.5e-6,
  parameter real C      = 20e-6,
  parameter real RESR   = 0.0,
  parameter real RS     = 0.05,
  parameter real VG     = 5.0,
  parameter real VREF   = 1.8,
  parameter real I_INIT = 0.2,
  parameter real DT     = 20e-9
) (
  input  logic clk,
  input  logic gate,
  input  real  i_load,
  output real  vout,
  output real  i_l
);
  real vc = VREF;
  initial i_l = I_INIT;

  always @(posedge clk) begin
    real vsw;
    vsw = gate ? VG : 0.0;
    i_l <= i_l + (vsw - vout - RS * i_l) / L * DT;
    vc  <= vc + (i_l - i_load) / C * DT;
  end

  assign vout = vc + RESR * (i_l - i_load);
endmodule
