// sbux_pkg: defaults shared by the smoothed buffered crossbar (sBUX) and its
// bandwidth regulator.
//
// The switch size N = 32, regulation period T = 256 slots, demand width
// L = 16 bits, M = 100 parallel scaler dividers, the two-cell crosspoint
// buffer and the 64-byte cell are the numbers the design is built around.
// The VOQ depth and the fabric latency are this design's own choices.
// Rates are integers a in [0, T]: a flow with rate a receives a/T of a link,
// that is a cell services per period of T slots.
package sbux_pkg;

  localparam int unsigned N_DEF         = 32;   // switch size
  localparam int unsigned T_DEF         = 256;  // rate period, slots
  localparam int unsigned L_DEF         = 16;   // demand word, bits
  localparam int unsigned M_DEF         = 100;  // parallel scaler dividers
  localparam int unsigned XPB_DEPTH_DEF = 2;    // crosspoint buffer, cells
  localparam int unsigned CELL_W_DEF    = 512;  // 64-byte cell
  localparam int unsigned VOQ_DEPTH_DEF = 256;  // per VOQ, cells: one period at full rate (own choice)
  localparam int unsigned LAT_DEF       = 4;    // line card -> core, slots (own choice)

  // Width of a rate value a in [0, T].
  function automatic int unsigned rate_w(int unsigned t);
    return $clog2(t + 1);
  endfunction

endpackage
