// tb_tbic_bus_driver: self-checking test of tbic_bus_driver.
//
// Applies all eight combinations of R0, R1 and RM and checks the two wires:
// the M-line must be at mid-level exactly when RM=1 and at R0 otherwise, and
// the N-line must follow R1.
module tb_tbic_bus_driver;
  import tbic_pkg::*;

  logic        r0, r1, rm;
  tbic_lines_t lines;
  int          checks = 0;
  int          failures = 0;

  tbic_bus_driver dut (.r0(r0), .r1(r1), .rm(rm), .lines(lines));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {rm, r1, r0} = 3'(i);
      #1;
      checks++;
      if (lines.m.mid !== rm) begin
        failures++;
        $display("RM=%b R0=%b: M-line mid=%b", rm, r0, lines.m.mid);
      end
      checks++;
      if (!rm && lines.m.val !== r0) begin
        failures++;
        $display("RM=0 R0=%b: M-line level %b", r0, lines.m.val);
      end
      checks++;
      if (rm && lines.m.val !== 1'b0) begin
        failures++;
        $display("RM=1: M-line carries a binary value while at mid-level");
      end
      checks++;
      if (lines.n !== r1) begin
        failures++;
        $display("R1=%b: N-line %b", r1, lines.n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
