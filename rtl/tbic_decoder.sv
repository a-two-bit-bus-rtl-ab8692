// tbic_decoder: decoder of one two-bit bus-invert (TBIC) sub-bus.
//
// The decoder keeps a 3-bit register: R0 and R1 hold the previous received
// binary values of the M-line and the N-line, and RM whether the M-line was
// at mid-level in the previous cycle. The level detector gives M and the
// received bit B0 (R0 while the line is at mid-level). The inversion flag is
//   inv = M & (~RM | ~(B1 ^ R1))
// i.e. a mid-level M-line means "inverted" when it has just entered M, or
// when it stays at M while the N-line keeps its value. A mid-level line that
// stays at M while the N-line toggles is the encoder holding M during a
// non-inverted word. The data are D0 = B0 ^ inv, D1 = B1 ^ inv, and M, B0, B1
// are stored for the next cycle.
//
// Interface: lines from the bus; d is the decoded word (d[0] from the
// M-line, d[1] from the N-line); inv is the decoded inversion flag.
// Timing: d is combinational from the lines and the register, so a word is
// decoded in the same cycle the bus carries it. The register loads at each
// rising clk edge. While the synchronous active-low reset is asserted, RM is
// cleared and R0, R1 are loaded from the binary levels now on the M-line and
// the N-line, as the scheme prescribes for start-up; with the encoder in
// reset both wires are at L, so both ends start from the same state.
module tbic_decoder
  import tbic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  tbic_lines_t lines,
  output logic [1:0]  d,
  output logic        inv
);

  logic r0, r1, rm;
  logic m, b0, b1;

  tbic_level_detector u_det (
    .mline (lines.m),
    .r0    (r0),
    .m     (m),
    .b0    (b0)
  );

  always_comb begin
    b1   = lines.n;
    inv  = m & (~rm | ~(b1 ^ r1));
    d[0] = b0 ^ inv;
    d[1] = b1 ^ inv;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r0 <= lines.m.val;
      r1 <= lines.n;
      rm <= 1'b0;
    end else begin
      r0 <= b0;
      r1 <= b1;
      rm <= m;
    end
  end

endmodule
