// tb_tbic_level_detector: self-checking test of tbic_level_detector.
//
// Presents the M-line at L, H and mid-level, each with the stored R0 at 0 and
// 1, and checks M and the received bit B0 (the line level, or R0 while the
// line is at mid-level).
module tb_tbic_level_detector;
  import tbic_pkg::*;

  mline_t mline;
  logic   r0, m, b0;
  int     checks = 0;
  int     failures = 0;

  tbic_level_detector dut (.mline(mline), .r0(r0), .m(m), .b0(b0));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lvl = 0; lvl < 3; lvl++) begin
      for (int s = 0; s < 2; s++) begin
        r0    = s[0];
        mline = (lvl == 2) ? MLINE_M : '{mid: 1'b0, val: lvl[0]};
        #1;
        checks++;
        if (m !== (lvl == 2)) begin
          failures++;
          $display("level %0d: M=%b", lvl, m);
        end
        checks++;
        if (b0 !== ((lvl == 2) ? r0 : lvl[0])) begin
          failures++;
          $display("level %0d R0=%b: B0=%b", lvl, r0, b0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
