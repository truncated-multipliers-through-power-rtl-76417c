// dpa_pkg -- constants and types shared by the power-gated truncated
// multiplier, its power-gating controller and the FIR filter built on it.
//
// The numbers follow the design point evaluated in the text: an 8x8-bit
// two's-complement multiplier whose 8 least significant product columns can
// be power-gated, grouped in clusters of 4 columns (two power domains, one
// per truncation step k = 4 and k = 8), and a 16-tap FIR filter with 8-bit
// samples and coefficients and a 16-bit output.
//
// The power-domain state type encodes the four phases of the power-off and
// power-on sequence (isolate, sleep, wake, de-isolate); its encoding is a
// choice of this design.
package dpa_pkg;

  // Operand width of the multiplier (8x8 bits).
  localparam int unsigned MUL_N    = 8;
  // Number of least significant product columns that can be power-gated
  // (columns 0..7).
  localparam int unsigned MUL_KMAX = 8;
  // Columns per power domain (granularity g). The main configuration is g = 4.
  localparam int unsigned MUL_G    = 4;

  // FIR filter of the case study.
  localparam int unsigned FIR_TAPS = 16;
  localparam int unsigned FIR_OUTW = 16;

  // State of one power domain.
  //   PD_ON    powered, outputs pass (isolation transparent)
  //   PD_ISO   powered, outputs isolated (first power-off cycle)
  //   PD_OFF   sleep transistor off, outputs isolated
  //   PD_WAKE  sleep transistor back on, outputs still isolated
  //            (first power-on cycle)
  typedef enum logic [1:0] {
    PD_ON   = 2'd0,
    PD_ISO  = 2'd1,
    PD_OFF  = 2'd2,
    PD_WAKE = 2'd3
  } pd_state_e;

  // Maximum error, in units of the least significant product bit, of the
  // multiplier with its k least significant columns removed:
  //   eps_max(k) = sum_{j=0..k} (2^(k-j) - 1) * 2^j
  function automatic longint unsigned eps_max(input int unsigned k);
    longint unsigned s = 0;
    for (int unsigned j = 0; j <= k; j++)
      s += ((longint'(1) << (k - j)) - 1) << j;
    return s;
  endfunction

endpackage
