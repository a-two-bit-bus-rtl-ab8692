// tbic_ref_encoder: testbench reference for the wire values of a WIDTH-bit
// TBIC bus.
//
// Behavioural model written from the encoder truth table: for each two-bit
// slice it keeps the wire state (R0, R1, RM) and on each rising clk edge
// applies the row selected by RM and by which data bits differ from R0/R1.
// An odd top bit is registered and sent uncoded. Outputs are the expected
// bus wires and the inversion decision for the word now at data.
module tbic_ref_encoder
  import tbic_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned K    = WIDTH / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WIDTH-1:0]    data,
  output tbic_lines_t [K-1:0] lines,
  output logic                plain_line,
  output logic [K-1:0]        inv
);

  logic [K-1:0] s0, s1, sm;

  always_comb begin
    for (int i = 0; i < K; i++) begin
      inv[i]        = (data[2*i] != s0[i]) && (data[2*i+1] != s1[i]);
      lines[i].m    = sm[i] ? MLINE_M : '{mid: 1'b0, val: s0[i]};
      lines[i].n    = s1[i];
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      s0 <= '0; s1 <= '0; sm <= '0;
      plain_line <= 1'b0;
    end else begin
      for (int i = 0; i < K; i++) begin
        case ({sm[i], data[2*i] == s0[i], data[2*i+1] == s1[i]})
          3'b011, 3'b111: sm[i] <= 1'b0;
          3'b010:         begin s1[i] <= ~s1[i]; sm[i] <= 1'b0; end
          3'b110:         begin s1[i] <= ~s1[i]; sm[i] <= 1'b1; end
          3'b001, 3'b101: begin s0[i] <= ~s0[i]; sm[i] <= 1'b0; end
          default:        sm[i] <= 1'b1;
        endcase
      end
      plain_line <= (WIDTH % 2 == 1) ? data[WIDTH-1] : 1'b0;
    end
  end

endmodule
