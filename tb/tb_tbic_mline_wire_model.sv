// tb_tbic_mline_wire_model: test of the analog M-line model.
//
// Part 1 drives one model with each of the three line levels and checks the
// wire voltage and the detected level once the settling time has passed,
// and that the detected level has not yet moved one nanosecond after the
// driver changed. It does so for mid-levels of 0.5, 0.6 and 0.7 V, the range
// the reference mid-level generator produces.
// Part 2 runs a 16-bit tbic_link with the analog line model inserted and
// checks that random words still return one cycle later.
module tb_tbic_mline_wire_model;
  import tbic_pkg::*;

  int     checks = 0;
  int     failures = 0;
  mline_t tx;
  real    v[3];
  mline_t rx[3];
  real    vmid[3] = '{0.5, 0.6, 0.7};

  tbic_mline_wire_model #(.VMID(0.5)) u_m5 (.tx_level(tx), .v_line(v[0]), .rx_level(rx[0]));
  tbic_mline_wire_model #(.VMID(0.6)) u_m6 (.tx_level(tx), .v_line(v[1]), .rx_level(rx[1]));
  tbic_mline_wire_model #(.VMID(0.7)) u_m7 (.tx_level(tx), .v_line(v[2]), .rx_level(rx[2]));

  // Part 2: link with the analog line.
  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic [15:0]        tx_data, rx_data;
  tbic_lines_t [7:0]  bus_lines;
  logic               bus_plain;
  logic [7:0]         tx_inv, rx_inv;
  int                 mids = 0;

  tbic_link #(.WIDTH(16), .ANALOG_LINE(1'b1)) u_link (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .rx_data(rx_data),
    .bus_lines(bus_lines), .bus_plain(bus_plain), .tx_inv(tx_inv), .rx_inv(rx_inv)
  );

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(mline_t lvl, int n_code);
    mline_t prev_rx[3];
    for (int k = 0; k < 3; k++) prev_rx[k] = rx[k];
    tx = lvl;
    #1ns;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (rx[k] != prev_rx[k]) begin
        failures++;
        $display("VMID %0.1f: detected level moved prev_rx the line settled", vmid[k]);
      end
    end
    #4ns;
    for (int k = 0; k < 3; k++) begin
      real want_v;
      want_v = (n_code == 2) ? vmid[k] : (n_code == 1 ? 1.2 : 0.0);
      checks++;
      if (v[k] < want_v - 1e-6 || v[k] > want_v + 1e-6) begin
        failures++;
        $display("VMID %0.1f level %0d: wire at %0.3f V, expected %0.3f V", vmid[k], n_code, v[k], want_v);
      end
      checks++;
      if (rx[k] != lvl) begin
        failures++;
        $display("VMID %0.1f level %0d: detected %b", vmid[k], n_code, rx[k]);
      end
    end
  endtask

  // Level sequence for part 1: every transition between L, H and M.
  mline_t seq[8] = '{MLINE_M, '{1'b0, 1'b1}, MLINE_M, '{1'b0, 1'b0}, '{1'b0, 1'b1},
                     '{1'b0, 1'b0}, MLINE_M, '{1'b0, 1'b0}};

  initial begin
    tx = '{mid: 1'b0, val: 1'b0};
    #5ns;
    foreach (seq[j]) apply(seq[j], seq[j].mid ? 2 : int'(seq[j].val));

    // Part 2: 20 ns clock, line settles in 2 ns.
    tx_data = '0;
    repeat (3) begin #10ns clk = 1'b1; #10ns clk = 1'b0; end
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      tx_data = 16'($urandom);
      #10ns clk = 1'b1;
      #5ns;
      for (int i = 0; i < 8; i++) if (bus_lines[i].m.mid) mids++;
      checks++;
      if (rx_data !== tx_data) begin
        failures++;
        if (failures < 10) $display("word %0d: received %h, sent %h", n, rx_data, tx_data);
      end
      #5ns clk = 1'b0;
    end
    checks++;
    if (mids == 0) begin
      failures++;
      $display("mid-level never used on the analog line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
