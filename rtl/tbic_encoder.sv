// tbic_encoder: encoder of one two-bit bus-invert (TBIC) sub-bus.
//
// Bus-invert coding sends the complement of a data word when that toggles
// fewer wires. On a two-bit sub-bus the word is inverted only when both data
// bits differ from the values held on the wires. Instead of an extra invert
// wire, the inversion is signalled by putting the M-line into its mid-level
// state (M). The encoder keeps a 3-bit register: R0 and R1 hold the binary
// values of the M-line (bit 0) and the N-line (bit 1), and RM=1 puts the
// M-line at mid-level. Next state, as given for this scheme:
//   inv = (D0 ^ R0) & (D1 ^ R1)
//   R0+ = inv ^ D0,  R1+ = inv ^ D1
//   RM+ = inv | (RM & (D1 ^ R1))
// The second RM term keeps the M-line at mid-level while only the N-line
// changes, so that no more than one wire changes in any cycle.
//
// Interface: d[0] is D0 (sent on the M-line), d[1] is D1 (N-line). The
// register outputs r0, r1, rm feed the bus driver. inv is the combinational
// inversion decision for the data now at d.
// Timing: d is sampled at each rising clk edge; the new register value, and
// therefore the bus state, appears after that edge. Synchronous active-low
// reset clears R0, R1 and RM (both wires at L); the reset value is this
// design's choice.
module tbic_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  output logic       r0,
  output logic       r1,
  output logic       rm,
  output logic       inv
);

  logic r0_nx, r1_nx, rm_nx;

  always_comb begin
    inv   = (d[0] ^ r0) & (d[1] ^ r1);
    r0_nx = inv ^ d[0];
    r1_nx = inv ^ d[1];
    rm_nx = inv | (rm & (d[1] ^ r1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r0 <= 1'b0;
      r1 <= 1'b0;
      rm <= 1'b0;
    end else begin
      r0 <= r0_nx;
      r1 <= r1_nx;
      rm <= rm_nx;
    end
  end

  // When the word is inverted, both wires' binary values stay unchanged.
  assert property (@(posedge clk) disable iff (!rst_n) inv |-> (r0_nx == r0 && r1_nx == r1));

endmodule
