// Look-up table k1*sqrt(dv) of the optimal time calculator.
//
// Address: output voltage deviation in Vq/16 units (Vq = 25 mV, 0..255, i.e.
// up to about 0.4 V). Data: k1*sqrt(dv) expressed in delay cells with eight
// fractional bits. K1_Q8 is k1*sqrt(Vq/16)/T scaled by 256, where
// k1 = sqrt(2LC/Vout); the default 1886 belongs to L = 2.5 uH, C = 20 uF,
// Vout = 1.8 V and T = 40 ns (the inductor and capacitor values are this
// design's assumption). The table is filled at elaboration from
// value = K1_Q8 * floor(sqrt(dv * 2^16)) / 2^8 and read combinationally.
module sqrt_lut #(
  parameter int unsigned K1_Q8 = 1886,
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 16
) (
  input  logic [AW-1:0] dv,
  output logic [DW-1:0] k1_sqrt   // cells, Q(DW-8).8
);

  localparam int unsigned DEPTH = 1 << AW;

  function automatic logic [DEPTH*DW-1:0] build();
    logic [DEPTH*DW-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      longint unsigned v;
      v = (longint'(K1_Q8) * ctdc_pkg::isqrt(longint'(i) << 16)) >> 8;
      if (v > (64'd1 << DW) - 1) v = (64'd1 << DW) - 1;
      t[i*DW +: DW] = DW'(v);
    end
    return t;
  endfunction

  localparam logic [DEPTH*DW-1:0] ROM = build();

  assign k1_sqrt = ROM[dv*DW +: DW];

endmodule
