// atpg_pkg: types and constants shared by the low-power ATPG (automatic test
// pattern generation) blocks.
//
// PAT_W is the 10-bit pattern width used for the half-adder experiment (five
// bits of operand A, five of operand B). LFSR_TAPS is the feedback mask of the
// pattern generator: the new bit shifted into bit 0 is the XOR of the state
// bits whose mask bit is set. The mask {bit 9, bit 0} reproduces the pattern
// sequence of the reference simulation of the design (0101100000, 1011000000,
// 0110000001, 1100000011, ...); it gives a cycle of 889 states, not the
// 1023 of a maximal-length polynomial.
//
// The FIR coefficients are the 5-tap low-pass set 0.0000, 0.1083, 0.5000,
// 0.1081, 0.0000 (Blackman window, cut-off 0.5*pi), quantised here to
// unsigned fixed point with FIR_FRAC = 12 fractional bits:
// round(c * 4096) = 0, 444, 2048, 443, 0. The fixed-point format is this
// design's choice.
package atpg_pkg;

  localparam int unsigned PAT_W = 10;
  localparam logic [PAT_W-1:0] LFSR_TAPS = 10'b10_0000_0001;

  typedef logic [PAT_W-1:0] pattern_t;

  localparam int unsigned FIR_NTAPS = 5;
  localparam int unsigned FIR_FRAC  = 12;
  localparam int unsigned FIR_COEF_W = 13;
  typedef logic [FIR_COEF_W-1:0] fir_coef_t;
  localparam fir_coef_t FIR_COEF [FIR_NTAPS] = '{13'd0, 13'd444, 13'd2048, 13'd443, 13'd0};

  // Session controller states.
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for en
    ST_LOAD,   // load Gray-coded seed, clear MISRs and FIR delay line
    ST_RUN,    // one pattern per clock, NUM_PATTERNS clocks
    ST_CHECK,  // TPAs compare signatures
    ST_DONE    // result held until en is released
  } ctrl_state_t;

endpackage
