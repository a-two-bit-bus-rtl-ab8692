// tbic_transmitter: transmitting end of a WIDTH-bit TBIC bus.
//
// The bus is cut into K = WIDTH/2 independent two-bit sub-buses. Sub-bus i
// carries data bits 2i (on its M-line) and 2i+1 (on its N-line) through its
// own tbic_encoder and tbic_bus_driver; the sub-buses share nothing but the
// clock and reset. When WIDTH is odd, the top bit WIDTH-1 is not coded: it is
// registered like the coded bits, so that it stays aligned with them, and sent
// on a plain wire (plain_line). For even WIDTH plain_line is held at 0.
// Splitting into two-bit sub-buses and leaving the odd line uncoded follow
// the scheme; the bit-to-sub-bus mapping and the register on the odd line are
// this design's choices.
//
// Interface: data is sampled at each rising clk edge; the bus (lines,
// plain_line) shows the coded word after that edge. inv reports, per
// sub-bus, the inversion decided for the word now at data. Synchronous
// active-low reset puts every wire at L. An assertion checks the scheme's
// rule that at most one of the two wires of a sub-bus changes per cycle.
module tbic_transmitter
  import tbic_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned K    = WIDTH / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [WIDTH-1:0]        data,
  output tbic_lines_t [K-1:0]     lines,
  output logic                    plain_line,
  output logic [K-1:0]            inv
);

  for (genvar i = 0; i < K; i++) begin : g_sub
    logic r0, r1, rm;

    tbic_encoder u_enc (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (data[2*i +: 2]),
      .r0    (r0),
      .r1    (r1),
      .rm    (rm),
      .inv   (inv[i])
    );

    tbic_bus_driver u_drv (
      .r0    (r0),
      .r1    (r1),
      .rm    (rm),
      .lines (lines[i])
    );

    // The coding never changes both wires of a sub-bus in one cycle.
    assert property (@(posedge clk) disable iff (!rst_n || !chk_en)
                     $stable(lines[i].m) || $stable(lines[i].n));
  end

  // Enables the wire-change assertion from the second edge after reset, so
  // that the comparison never involves a pre-reset value.
  logic chk_en;
  always_ff @(posedge clk) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end

  if (WIDTH % 2 == 1) begin : g_odd
    always_ff @(posedge clk) begin
      if (!rst_n) plain_line <= 1'b0;
      else        plain_line <= data[WIDTH-1];
    end
  end else begin : g_even
    assign plain_line = 1'b0;
  end

endmodule
