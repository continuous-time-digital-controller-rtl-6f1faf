// Optimal t_on / t_off calculator of the CT-DSP, with digital error
// correction.
//
// From the peak detector it receives the number of thresholds crossed
// (level) and N_max, the cells the deepest comparator stayed set. The extreme
// point lies dt = N_max/2 cells before the detection. The calculator
//   1. corrects the coarse deviation: dv = level*Vq + dv_err, where dv_err is
//      the extra excursion beyond the last threshold, k2 (1-D)/D dt^2 for a
//      dip (eq. 9) and k2 dt^2 for an overshoot (the same derivation with the
//      off-state slope Vout/L, this design's extension);
//   2. looks up k1*sqrt(dv) and multiplies it by D/sqrt(1-D) and sqrt(1-D)
//      (eqs. 7 and 8, the forms that need no input-voltage measurement);
//   3. subtracts dt from the first interval of the sequence (t_on after a
//      dip, t_off after an overshoot), because that interval started at the
//      extreme point, dt before the detection. LAT_CELLS more cells are
//      subtracted for the fixed latency of this synchronous realisation
//      (comparator synchroniser, adder register, detector and calculator
//      registers: about five 20 ns clocks at the defaults), a correction
//      the asynchronous original does not need.
//   4. optionally adds TAU_ESR_CELLS back to that first interval. A capacitor
//      ESR makes the voltage extreme occur tau_esr = C*R_esr before the
//      capacitor current crosses zero, which is the point charge balance is
//      referred to; the document proposes delaying the reference by tau_esr
//      when it is known. The default 0 is the uncompensated controller.
// D is the low-pass filtered duty command. Deviation codes are in Vq/16
// units, times in cells, both saturating. Two register stages: `valid`
// pulses two clocks after `start` with t_on/t_off, which then hold.
module optimal_time_calc
  import ctdc_pkg::*;
#(
  parameter int unsigned PERIOD = 125,
  parameter int unsigned CELLS  = 64,
  parameter int unsigned K1_Q8  = 1886,
  parameter int unsigned K2_Q16 = 1208,
  parameter int unsigned LAT_CELLS = 2,
  parameter int unsigned TAU_ESR_CELLS = 0,
  localparam int unsigned YW    = $clog2(CELLS + 1),
  localparam int unsigned DW    = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          dip,
  input  logic [2:0]    level,
  input  logic [YW-1:0] n_max,
  input  logic [DW-1:0] d_lp,
  output logic          valid,
  output cells_t        t_on,
  output cells_t        t_off
);

  // ---- stage 1: deviation with error correction ----------------------------
  logic [11:0] f_on;
  logic [8:0]  f_off;
  logic [15:0] g_dip, g;
  logic [2*YW-1:0] n2;
  logic [31:0] dv_err;
  logic [31:0] dv_sum;
  logic [7:0]  dv;

  duty_lut #(.PERIOD(PERIOD), .K2_Q16(K2_Q16)) u_duty_lut (
    .d(d_lp), .f_on(f_on), .f_off(f_off), .g_dip(g_dip)
  );

  always_comb begin
    g      = dip ? g_dip : 16'(K2_Q16 / 4);
    n2     = (2*YW)'(n_max) * (2*YW)'(n_max);
    dv_err = (32'(g) * 32'(n2)) >> 16;
    dv_sum = (32'(level) << DV_FRAC) + dv_err;
    dv     = (dv_sum > 32'd255) ? 8'd255 : dv_sum[7:0];
  end

  logic        s1_valid, s1_dip;
  logic [7:0]  s1_dv;
  logic [YW-1:0] s1_dt;
  logic [11:0] s1_f_on;
  logic [8:0]  s1_f_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_dip   <= 1'b0;
      s1_dv    <= '0;
      s1_dt    <= '0;
      s1_f_on  <= '0;
      s1_f_off <= '0;
    end else begin
      s1_valid <= start;
      if (start) begin
        s1_dip   <= dip;
        s1_dv    <= dv;
        s1_dt    <= YW'((n_max + 1'b1) >> 1);   // dt = N_max*T/2, rounded
        s1_f_on  <= f_on;
        s1_f_off <= f_off;
      end
    end
  end

  // ---- stage 2: optimal times ------------------------------------------------
  logic [15:0] k1s;
  logic [31:0] on_raw, off_raw;
  logic [31:0] on_c, off_c;
  logic [31:0] corr;

  assign corr = 32'(s1_dt) + 32'(LAT_CELLS);

  sqrt_lut #(.K1_Q8(K1_Q8)) u_sqrt_lut (.dv(s1_dv), .k1_sqrt(k1s));

  function automatic cells_t sat_cells(input logic [31:0] x);
    return (x > 32'((1 << TW) - 1)) ? cells_t'((1 << TW) - 1) : cells_t'(x);
  endfunction

  always_comb begin
    on_raw  = (32'(k1s) * 32'(s1_f_on)  + 32'h8000) >> 16;
    off_raw = (32'(k1s) * 32'(s1_f_off) + 32'h8000) >> 16;
    on_c    = on_raw;
    off_c   = off_raw;
    if (s1_dip) on_c  = (on_raw  + TAU_ESR_CELLS > corr) ? on_raw  + TAU_ESR_CELLS - corr : '0;
    else        off_c = (off_raw + TAU_ESR_CELLS > corr) ? off_raw + TAU_ESR_CELLS - corr : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      t_on  <= '0;
      t_off <= '0;
    end else begin
      valid <= s1_valid;
      if (s1_valid) begin
        t_on  <= sat_cells(on_c);
        t_off <= sat_cells(off_c);
      end
    end
  end

endmodule
