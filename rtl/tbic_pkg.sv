// tbic_pkg: types shared by the two-bit bus-invert coding (TBIC) blocks.
//
// A TBIC sub-bus has two wires. The N-line is an ordinary binary wire. The
// M-line has a third, mid-level state (M) between L (0 V) and H (VDD); the
// exact voltage of M does not matter to the logic. In RTL the M-line is
// carried as a two-bit code, mline_t: mid=1 means the line sits at the
// mid-level (val is then meaningless and is driven 0), mid=0 means the line
// is at the binary level val. This code is this design's own abstraction of
// the analog line; a real chip replaces it with the mid-level generator and
// level detector circuits at the two ends of the wire.
package tbic_pkg;

  // Three-level M-line value.
  typedef struct packed {
    logic mid;  // 1: line at mid-level (M-state)
    logic val;  // binary level when mid == 0
  } mline_t;

  // The two wires of one TBIC sub-bus.
  typedef struct packed {
    mline_t m;  // M-line, carries data bit 0 and the coding information
    logic   n;  // N-line, carries data bit 1
  } tbic_lines_t;

  localparam mline_t MLINE_M = '{mid: 1'b1, val: 1'b0};

endpackage
