// Look-up tables of the duty-ratio factors used by the optimal time
// calculator, addressed by the filtered duty D in DPWM counts (D = d/PERIOD).
//
//   f_on  = D / sqrt(1-D)            eight fractional bits (t_on factor, eq. 7)
//   f_off = sqrt(1-D)                eight fractional bits (t_off factor, eq. 8)
//   g_dip = K2_Q16 * (1-D) / (4 D)   sixteen fractional bits (eq. 9 with
//                                    dt = N_max/2 cells, so dt^2 = N_max^2/4)
//
// K2_Q16 is k2*T^2/(Vq/16) scaled by 2^16, with k2 = Vout/(2LC); the default
// 1208 belongs to the assumed 2.5 uH / 20 uF filter and T = 40 ns. Entries that
// would overflow (D near 0 or 1) saturate; addresses above PERIOD read the
// PERIOD entry. Filled at elaboration with integer square roots, read
// combinationally.
module duty_lut #(
  parameter int unsigned PERIOD = 125,
  parameter int unsigned K2_Q16 = 1208,
  localparam int unsigned AW    = $clog2(PERIOD + 1)
) (
  input  logic [AW-1:0] d,
  output logic [11:0]   f_on,
  output logic [8:0]    f_off,
  output logic [15:0]   g_dip
);

  localparam int unsigned DEPTH = PERIOD + 1;

  function automatic logic [DEPTH*12-1:0] build_on();
    logic [DEPTH*12-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      longint unsigned r, v;
      r = ctdc_pkg::isqrt(longint'(PERIOD) * (64'(PERIOD) - 64'(i)) * 64'd65536);
      v = (r == 0) ? 64'd4095 : (longint'(i) * 65536) / r;
      if (v > 4095) v = 4095;
      t[i*12 +: 12] = 12'(v);
    end
    return t;
  endfunction

  function automatic logic [DEPTH*9-1:0] build_off();
    logic [DEPTH*9-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i*9 +: 9] = 9'(ctdc_pkg::isqrt(((64'(PERIOD) - 64'(i)) * 64'd65536) / longint'(PERIOD)));
    return t;
  endfunction

  function automatic logic [DEPTH*16-1:0] build_g();
    logic [DEPTH*16-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      longint unsigned v;
      v = (i == 0) ? 64'd65535 : (longint'(K2_Q16) * (64'(PERIOD) - 64'(i))) / longint'(4 * i);
      if (v > 65535) v = 65535;
      t[i*16 +: 16] = 16'(v);
    end
    return t;
  endfunction

  localparam logic [DEPTH*12-1:0] ROM_ON  = build_on();
  localparam logic [DEPTH*9-1:0]  ROM_OFF = build_off();
  localparam logic [DEPTH*16-1:0] ROM_G   = build_g();

  logic [AW-1:0] a;
  assign a     = (d > AW'(PERIOD)) ? AW'(PERIOD) : d;
  assign f_on  = ROM_ON [a*12 +: 12];
  assign f_off = ROM_OFF[a*9  +: 9];
  assign g_dip = ROM_G  [a*16 +: 16];

endmodule
