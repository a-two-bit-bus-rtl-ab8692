// tb_tbic_encoder: self-checking test of tbic_encoder.
//
// Drives random two-bit words and compares inv and the next register state
// with a reference written row by row from the encoder truth table (the
// eight cases of RM and of which data bits differ from R0/R1), not from the
// encoder's equations. Also checks that no more than one of the two wires
// (M-line with its three levels, N-line) changes per cycle, and that every
// one of the 32 (state, input) combinations was exercised.
module tb_tbic_encoder;
  import tbic_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] d;
  logic       r0, r1, rm, inv;
  int         checks = 0;
  int         failures = 0;
  bit [31:0]  seen;

  tbic_encoder dut (.clk(clk), .rst_n(rst_n), .d(d), .r0(r0), .r1(r1), .rm(rm), .inv(inv));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth-table reference: {R0+, R1+, RM+, inv} for the current state and d.
  function automatic logic [3:0] ref_next(logic cr0, logic cr1, logic crm, logic [1:0] dd);
    logic same0, same1;
    same0 = (dd[0] == cr0);
    same1 = (dd[1] == cr1);
    case ({crm, same0, same1})
      3'b011:  return {cr0,  cr1,  1'b0, 1'b0};
      3'b010:  return {cr0,  ~cr1, 1'b0, 1'b0};
      3'b001:  return {~cr0, cr1,  1'b0, 1'b0};
      3'b000:  return {cr0,  cr1,  1'b1, 1'b1};
      3'b111:  return {cr0,  cr1,  1'b0, 1'b0};
      3'b110:  return {cr0,  ~cr1, 1'b1, 1'b0};
      3'b101:  return {~cr0, cr1,  1'b0, 1'b0};
      default: return {cr0,  cr1,  1'b1, 1'b1};
    endcase
  endfunction

  // Three-level M-line value seen on the wire: 0, 1 or 2 (mid-level).
  function automatic int mlevel(logic cr0, logic crm);
    return crm ? 2 : int'(cr0);
  endfunction

  logic [3:0] exp;
  logic       p0, p1, pm;
  int         changes;

  initial begin
    seen  = '0;
    rst_n = 1'b0;
    d     = 2'b00;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({r0, r1, rm} != 3'b000) begin
      failures++;
      $display("reset state wrong: %b%b%b", r0, r1, rm);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      d = 2'($urandom);
      #1;
      exp = ref_next(r0, r1, rm, d);
      seen[{r0, r1, rm, d}] = 1'b1;
      checks++;
      if (inv !== exp[0]) begin
        failures++;
        $display("cycle %0d: inv=%b expected %b (R=%b%b%b d=%b)", n, inv, exp[0], r0, r1, rm, d);
      end
      p0 = r0; p1 = r1; pm = rm;
      @(posedge clk);
      #1;
      checks++;
      if ({r0, r1, rm} !== exp[3:1]) begin
        failures++;
        $display("cycle %0d: next R0R1RM=%b%b%b expected %b", n, r0, r1, rm, exp[3:1]);
      end
      changes = int'(mlevel(r0, rm) != mlevel(p0, pm)) + int'(r1 != p1);
      checks++;
      if (changes > 1) begin
        failures++;
        $display("cycle %0d: both wires changed", n);
      end
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("not every state/input combination exercised: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
