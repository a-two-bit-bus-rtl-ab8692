// tb_tbic_workload: transition reduction on random data at the four bus
// widths the scheme was evaluated on (16, 32, 64 and 128 bits).
//
// Each width streams 30000 uniformly random words through a tbic_link and
// compares the measured activity with the published averages for random
// binary files: data transitions P_B about 50 % of the raw transitions (of
// which 0<->1 about 42 % and via-transitions about 8 %), round transitions
// P_OT about 8.3 %, and a reduction ratio R about 45.7 %. Tolerances are
// +/-1 percentage point (+/-0.8 for R), well above the sampling spread of
// this stream length.
module tb_tbic_workload;

  localparam int NWORDS = 30000;

  logic clk = 1'b0;
  logic start = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic done[4];
  int   errors[4];
  real  p_b[4], p_ot[4], p_dt[4], p_vt[4], r[4];

  tbic_width_run #(.W(16),  .NWORDS(NWORDS)) u16  (.clk(clk), .start(start), .done(done[0]), .errors(errors[0]), .p_b(p_b[0]), .p_ot(p_ot[0]), .p_dt(p_dt[0]), .p_vt(p_vt[0]), .r(r[0]));
  tbic_width_run #(.W(32),  .NWORDS(NWORDS)) u32  (.clk(clk), .start(start), .done(done[1]), .errors(errors[1]), .p_b(p_b[1]), .p_ot(p_ot[1]), .p_dt(p_dt[1]), .p_vt(p_vt[1]), .r(r[1]));
  tbic_width_run #(.W(64),  .NWORDS(NWORDS)) u64  (.clk(clk), .start(start), .done(done[2]), .errors(errors[2]), .p_b(p_b[2]), .p_ot(p_ot[2]), .p_dt(p_dt[2]), .p_vt(p_vt[2]), .r(r[2]));
  tbic_width_run #(.W(128), .NWORDS(NWORDS)) u128 (.clk(clk), .start(start), .done(done[3]), .errors(errors[3]), .p_b(p_b[3]), .p_ot(p_ot[3]), .p_dt(p_dt[3]), .p_vt(p_vt[3]), .r(r[3]));

  always #5 clk = ~clk;

  initial begin
    #(10 * (NWORDS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(string what, int w, real got, real want, real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("width %0d: %s = %0.2f, expected %0.2f +/- %0.2f", w, what, got, want, tol);
    end
  endtask

  initial begin
    int widths[4] = '{16, 32, 64, 128};
    #1 start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      $display("width %3d: P_B %0.2f (0<->1 %0.2f, via %0.2f)  P_OT %0.2f  P_T %0.2f  R %0.2f",
               widths[i], p_b[i], p_dt[i], p_vt[i], p_ot[i], 100.0 - r[i], r[i]);
      checks++;
      if (errors[i] != 0) begin
        failures++;
        $display("width %0d: %0d words or cycles wrong", widths[i], errors[i]);
      end
      near("P_B", widths[i], p_b[i], 50.0, 1.0);
      near("P_B 0<->1", widths[i], p_dt[i], 41.8, 1.0);
      near("P_B via", widths[i], p_vt[i], 8.3, 1.0);
      near("P_OT", widths[i], p_ot[i], 8.3, 1.0);
      near("R", widths[i], r[i], 45.7, 0.8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
