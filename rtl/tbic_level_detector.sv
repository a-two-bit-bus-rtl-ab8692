// tbic_level_detector: M-line level detector of one TBIC decoder.
//
// The circuit compares the M-line against two switching thresholds, one below
// and one above the mid-level. The two paths disagree only when the line is
// at mid-level, and their XOR gives M. The received bit B0 is then taken from
// the decoder's stored R0 (the line carries no binary value while at
// mid-level); otherwise B0 is the line's binary level. In this RTL the line
// arrives as the mline_t code (tbic_pkg), so the threshold pair reduces to
// reading the code's mid flag.
//
// Interface: mline is the received M-line, r0 the decoder's stored R0.
// Outputs m (1: line at mid-level) and b0 (received bit). Combinational.
module tbic_level_detector
  import tbic_pkg::*;
(
  input  mline_t mline,
  input  logic   r0,
  output logic   m,
  output logic   b0
);

  logic thr_low;   // output of the path that switches below the mid-level
  logic thr_high;  // output of the path that switches above the mid-level

  always_comb begin
    // Mid-level is above the low threshold and below the high threshold.
    thr_low  = mline.mid | mline.val;
    thr_high = ~mline.mid & mline.val;
    m        = thr_low ^ thr_high;
    b0       = m ? r0 : thr_high;
  end

endmodule
