// Shared types, constants and helper functions of the continuous-time digital
// controller (CT-DSP fast recovery plus PID/DPWM regulator).
//
// The comparator window has N_SIDE thresholds below and N_SIDE above the
// reference, spaced by one quantisation step Vq (25 mV). Comparator index k on
// the low side trips when v < Vref - (k+1)*Vq; index N_SIDE+k trips when
// v > Vref + (k+1)*Vq. Eight comparators and the 25 mV step follow the
// prototype; the even split and the threshold positions are this design's
// choice. Voltage deviations inside the CT-DSP are coded in Vq/16 units
// (four fractional bits gained by the error correction); times are counted in
// delay cells of T = 40 ns.
package ctdc_pkg;

  localparam int unsigned N_SIDE  = 4;           // comparators per side
  localparam int unsigned N_COMP  = 2 * N_SIDE;  // windowed flash ADC size
  localparam int unsigned DV_FRAC = 4;           // fractional bits of a deviation code
  localparam int unsigned TW      = 8;           // width of t_on / t_off in cells

  typedef logic signed [3:0] err_t;              // e = Vref - v, in Vq steps
  typedef logic [TW-1:0]     cells_t;            // a time in delay cells

  // Transient type seen by the switching selector.
  typedef enum logic {OVERSHOOT = 1'b0, DIP = 1'b1} transient_e;

  // Integer square root (floor), used to fill the look-up tables at
  // elaboration time.
  function automatic longint unsigned isqrt(input longint unsigned x);
    longint unsigned r;
    r = 0;
    for (int b = 31; b >= 0; b--) begin
      longint unsigned t;
      t = r | (64'd1 << b);
      if (t * t <= x) r = t;
    end
    return r;
  endfunction

endpackage
