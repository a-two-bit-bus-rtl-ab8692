// tb_tbic_decoder: self-checking test of tbic_decoder.
//
// A behavioural encoder in the testbench, written from the encoder truth
// table, turns random two-bit words into M-line/N-line values; the decoder
// must return each word in the cycle its coded form is on the wires, and its
// inversion flag must match the one the encoder decided. Runs of words that
// keep the M-line at mid-level for several cycles, while the N-line toggles
// or not, are counted to be sure both meanings of a held mid-level occur.
// The stream starts from wires that are not all low, to check that the
// decoder takes its start-up state from the wires during reset.
module tb_tbic_decoder;
  import tbic_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  tbic_lines_t lines;
  logic [1:0]  d;
  logic        inv;
  int          checks = 0;
  int          failures = 0;
  int          held_inv = 0;
  int          held_plain = 0;

  tbic_decoder dut (.clk(clk), .rst_n(rst_n), .lines(lines), .d(d), .inv(inv));

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference encoder state.
  logic       e0, e1, em;
  logic [1:0] word;
  logic       e_inv;

  task automatic encode(input logic [1:0] w, output logic o_inv);
    logic same0, same1, pm;
    same0 = (w[0] == e0);
    same1 = (w[1] == e1);
    pm    = em;
    o_inv = 1'b0;
    if (!same0 && !same1) begin
      o_inv = 1'b1;
      em    = 1'b1;
    end else if (same0 && !same1) begin
      e1 = ~e1;
      em = pm;
    end else if (!same0 && same1) begin
      e0 = ~e0;
      em = 1'b0;
    end else begin
      em = 1'b0;
    end
  endtask

  initial begin
    // Start-up: the decoder must take R0 and R1 from the wires during reset,
    // so begin from a random wire state rather than all zeros.
    rst_n = 1'b0;
    e0 = 1'($urandom); e1 = 1'($urandom); em = 1'b0;
    if (!e0 && !e1) e0 = 1'b1;
    lines = '{m: '{mid: 1'b0, val: e0}, n: e1};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // Bias towards words that hold or re-enter the mid-level.
      word = 2'($urandom);
      if (em && ($urandom % 2 == 0)) word = {($urandom % 2 == 0) ? ~e1 : e1, ~e0};
      if (em && word[0] == e0) begin
        if (word[1] != e1) held_plain++;
      end
      if (em && word[0] != e0 && word[1] != e1) held_inv++;
      encode(word, e_inv);
      lines.m = em ? MLINE_M : '{mid: 1'b0, val: e0};
      lines.n = e1;
      #1;
      checks++;
      if (d !== word) begin
        failures++;
        $display("cycle %0d: decoded %b, sent %b", n, d, word);
      end
      checks++;
      if (inv !== e_inv) begin
        failures++;
        $display("cycle %0d: inv %b, encoder decided %b", n, inv, e_inv);
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (held_inv == 0 || held_plain == 0) begin
      failures++;
      $display("held mid-level cases not reached: inverted %0d, N-line only %0d", held_inv, held_plain);
    end
    $display("held mid-level: inverted %0d, N-line only %0d", held_inv, held_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
