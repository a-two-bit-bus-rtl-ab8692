// tbic_bus_driver: wire drivers of one TBIC sub-bus.
//
// The M-line is driven from R0 by a normal buffer when RM=0 and by the
// mid-level generator when RM=1; the two sources are selected by a pair of
// transmission gates controlled by RM. The N-line is driven from R1 by a
// normal buffer. In this RTL the analog mid-level is represented by the
// mline_t code (tbic_pkg): mid=1 with val=0. The transistor-level generator
// (whose mid-level lies between about 0.5 V and 0.7 V at VDD=1.2 V) is not
// modelled; only its logical effect, the M-state, is.
//
// Interface: r0, r1, rm from the encoder register; lines.m is the M-line,
// lines.n the N-line. Purely combinational.
module tbic_bus_driver
  import tbic_pkg::*;
(
  input  logic        r0,
  input  logic        r1,
  input  logic        rm,
  output tbic_lines_t lines
);

  always_comb begin
    // Transmission-gate select: mid-level generator when RM=1, R0 otherwise.
    lines.m = rm ? MLINE_M : '{mid: 1'b0, val: r0};
    lines.n = r1;
  end

endmodule
