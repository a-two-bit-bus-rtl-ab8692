// tb_tbic_transmitter: self-checking test of tbic_transmitter.
//
// Two instances, the default 32-bit one and a 7-bit one (three coded
// sub-buses plus one uncoded line), are driven with random words next to a
// truth-table reference encoder of the same width. Every cycle the wires and
// the inversion flags must match the reference.
module tb_tbic_transmitter;
  import tbic_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  logic [31:0]          da;
  tbic_lines_t [15:0]   la, ra;
  logic                 pa, rpa;
  logic [15:0]          ia, ria;
  logic [6:0]           db;
  tbic_lines_t [2:0]    lb, rb;
  logic                 pb, rpb;
  logic [2:0]           ib, rib;
  int                   plain_toggles = 0;

  tbic_transmitter                dut_a (.clk(clk), .rst_n(rst_n), .data(da), .lines(la), .plain_line(pa), .inv(ia));
  tbic_ref_encoder                ref_a (.clk(clk), .rst_n(rst_n), .data(da), .lines(ra), .plain_line(rpa), .inv(ria));
  tbic_transmitter #(.WIDTH(7))   dut_b (.clk(clk), .rst_n(rst_n), .data(db), .lines(lb), .plain_line(pb), .inv(ib));
  tbic_ref_encoder #(.WIDTH(7))   ref_b (.clk(clk), .rst_n(rst_n), .data(db), .lines(rb), .plain_line(rpb), .inv(rib));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_pb;

  initial begin
    rst_n = 1'b0;
    da = '0;
    db = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev_pb = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      da = $urandom;
      db = 7'($urandom);
      #1;
      checks++;
      if (ia !== ria || ib !== rib) begin
        failures++;
        if (failures < 10) $display("cycle %0d: inv %h/%h expected %h/%h", n, ia, ib, ria, rib);
      end
      @(posedge clk);
      #1;
      checks++;
      if (la !== ra || pa !== rpa) begin
        failures++;
        if (failures < 10) $display("cycle %0d: 32-bit bus %h expected %h", n, la, ra);
      end
      checks++;
      if (lb !== rb || pb !== rpb) begin
        failures++;
        if (failures < 10) $display("cycle %0d: 7-bit bus %h/%b expected %h/%b", n, lb, pb, rb, rpb);
      end
      if (pb != prev_pb) plain_toggles++;
      prev_pb = pb;
    end
    checks++;
    if (plain_toggles == 0) begin
      failures++;
      $display("uncoded line never toggled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
