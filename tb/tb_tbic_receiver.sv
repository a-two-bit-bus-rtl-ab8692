// tb_tbic_receiver: self-checking test of tbic_receiver.
//
// A truth-table reference encoder codes random words onto the wires of a
// 32-bit and of a 7-bit bus; each receiver must return the word in the cycle
// its coded form is on the wires, and its inversion flags must equal the
// encoder's decisions for that word.
module tb_tbic_receiver;
  import tbic_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  logic [31:0]          da, qa;
  tbic_lines_t [15:0]   la;
  logic                 pa;
  logic [15:0]          ia, ria, ea;
  logic [6:0]           db, qb;
  tbic_lines_t [2:0]    lb;
  logic                 pb;
  logic [2:0]           ib, rib, eb;

  tbic_ref_encoder              enc_a (.clk(clk), .rst_n(rst_n), .data(da), .lines(la), .plain_line(pa), .inv(ia));
  tbic_receiver                 dut_a (.clk(clk), .rst_n(rst_n), .lines(la), .plain_line(pa), .data(qa), .inv(ria));
  tbic_ref_encoder #(.WIDTH(7)) enc_b (.clk(clk), .rst_n(rst_n), .data(db), .lines(lb), .plain_line(pb), .inv(ib));
  tbic_receiver #(.WIDTH(7))    dut_b (.clk(clk), .rst_n(rst_n), .lines(lb), .plain_line(pb), .data(qb), .inv(rib));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    da = '0;
    db = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      da = $urandom;
      db = 7'($urandom);
      #1;
      ea = ia;
      eb = ib;
      @(posedge clk);
      #1;
      checks++;
      if (qa !== da || ria !== ea) begin
        failures++;
        if (failures < 10) $display("cycle %0d: 32-bit got %h inv %h, sent %h inv %h", n, qa, ria, da, ea);
      end
      checks++;
      if (qb !== db || rib !== eb) begin
        failures++;
        if (failures < 10) $display("cycle %0d: 7-bit got %h inv %h, sent %h inv %h", n, qb, rib, db, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
