// tbic_link: a complete WIDTH-bit bus with two-bit bus-invert coding (TBIC).
//
// A transmitter codes each two-bit slice of the word onto an N-line and a
// three-level M-line; a receiver decodes them back. Coding keeps at most one
// of the two wires of a slice changing per cycle and uses no extra invert
// wire, which removes most of the overhead transitions that ordinary
// bus-invert coding pays on its invert lines. The bus wires are brought out
// so that their activity can be observed. WIDTH defaults to 32, one of the
// bus widths (16, 32, 64, 128) on which the scheme was evaluated; any
// WIDTH >= 2 works, odd widths leaving the top bit uncoded.
//
// ANALOG_LINE (default 0) is a simulation option of this design: when set,
// each M-line passes through tbic_mline_wire_model, a behavioural model of
// the mid-level voltage and of the detector thresholds, instead of carrying
// the three-level code straight to the receiver. It needs a clock period
// longer than the model's settling time and is not synthesizable; with the
// default 0 the module is plain synthesizable logic.
//
// Interface: tx_data is sampled at each rising clk edge; the coded word is on
// bus_lines / bus_plain after that edge, and rx_data returns it
// combinationally in that same cycle (one cycle from tx_data to rx_data).
// tx_inv and rx_inv are the inversion flags at the two ends; rx_inv equals
// the tx_inv of the previous cycle. Synchronous active-low reset.
module tbic_link
  import tbic_pkg::*;
#(
  parameter int unsigned WIDTH       = 32,
  parameter bit          ANALOG_LINE = 1'b0,
  localparam int unsigned K    = WIDTH / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [WIDTH-1:0]        tx_data,
  output logic [WIDTH-1:0]        rx_data,
  output tbic_lines_t [K-1:0]     bus_lines,
  output logic                    bus_plain,
  output logic [K-1:0]            tx_inv,
  output logic [K-1:0]            rx_inv
);

  tbic_transmitter #(.WIDTH(WIDTH)) u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .data       (tx_data),
    .lines      (bus_lines),
    .plain_line (bus_plain),
    .inv        (tx_inv)
  );

  // Lines as seen at the receiving end.
  tbic_lines_t [K-1:0] rx_lines;

  if (ANALOG_LINE) begin : g_analog
    for (genvar i = 0; i < K; i++) begin : g_wire
      real v_mline;  // wire voltage, visible to a waveform viewer
      tbic_mline_wire_model u_wire (
        .tx_level (bus_lines[i].m),
        .v_line   (v_mline),
        .rx_level (rx_lines[i].m)
      );
      assign rx_lines[i].n = bus_lines[i].n;
    end
  end else begin : g_digital
    assign rx_lines = bus_lines;
  end

  tbic_receiver #(.WIDTH(WIDTH)) u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .lines      (rx_lines),
    .plain_line (bus_plain),
    .data       (rx_data),
    .inv        (rx_inv)
  );

endmodule
