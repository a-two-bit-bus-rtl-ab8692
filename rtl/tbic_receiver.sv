// tbic_receiver: receiving end of a WIDTH-bit TBIC bus.
//
// One tbic_decoder per two-bit sub-bus rebuilds data bits 2i and 2i+1 from
// the M-line and N-line of sub-bus i. When WIDTH is odd, the top bit is read
// straight from the uncoded plain_line. The mapping matches tbic_transmitter.
//
// Interface: data is combinational from the bus lines and the decoders'
// registers, so a word is available in the same cycle the bus carries it;
// the decoders' registers load at each rising clk edge. inv reports the
// decoded inversion flag of each sub-bus. Synchronous active-low reset.
module tbic_receiver
  import tbic_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned K    = WIDTH / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  tbic_lines_t [K-1:0]     lines,
  input  logic                    plain_line,
  output logic [WIDTH-1:0]        data,
  output logic [K-1:0]            inv
);

  for (genvar i = 0; i < K; i++) begin : g_sub
    tbic_decoder u_dec (
      .clk   (clk),
      .rst_n (rst_n),
      .lines (lines[i]),
      .d     (data[2*i +: 2]),
      .inv   (inv[i])
    );
  end

  if (WIDTH % 2 == 1) begin : g_odd
    assign data[WIDTH-1] = plain_line;
  end

endmodule
