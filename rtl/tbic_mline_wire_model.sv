// tbic_mline_wire_model: behavioural (non-synthesizable) model of one analog
// M-line, from the output of its driver to the input thresholds of the level
// detector.
//
// The driver end puts the wire at 0 V, at VDD, or - through the mid-level
// generator - at a mid-level VMID somewhere between (0.5 V to 0.7 V at
// VDD = 1.2 V for the reference circuit; the exact value does not matter to
// the logic). The detector end compares the wire with two switching
// thresholds, VTH_LO below the mid-level and VTH_HI above it: above both is H,
// below both is L, between them is the M-state. The wire is modelled as
// reaching its new level T_SETTLE after the driver changes (a transport
// delay); the exponential settling of the real line is not modelled.
// Thresholds and settling time are this design's assumptions.
//
// Interface: tx_level is the three-level code from tbic_bus_driver, v_line
// the wire voltage in volts, rx_level the code the detector's threshold pair
// sees (fed to tbic_level_detector). Sample rx_level at least T_SETTLE (in
// ns) after tx_level changes.
module tbic_mline_wire_model
  import tbic_pkg::*;
#(
  parameter real      VDD      = 1.2,
  parameter real      VMID     = 0.6,
  parameter real      VTH_LO   = 0.3,
  parameter real      VTH_HI   = 0.9,
  parameter realtime  T_SETTLE = 2.0ns
) (
  input  mline_t tx_level,
  output real    v_line,
  output mline_t rx_level
);

  function automatic real drive_voltage(mline_t lvl);
    if (lvl.mid) return VMID;
    return lvl.val ? VDD : 0.0;
  endfunction

  initial v_line = drive_voltage(tx_level);

  always @(tx_level) v_line <= #(T_SETTLE) drive_voltage(tx_level);

  always_comb begin
    if (v_line > VTH_HI)      rx_level = '{mid: 1'b0, val: 1'b1};
    else if (v_line < VTH_LO) rx_level = '{mid: 1'b0, val: 1'b0};
    else                      rx_level = MLINE_M;
  end

endmodule
