// tb_tbic_link: end-to-end test of tbic_link at its default width (32 bits).
//
// Sends a stream of words through the coded bus and checks that each word
// comes out of the receiver exactly one cycle after it is presented to the
// transmitter, and that the receiver's inversion flags repeat the
// transmitter's decision for that word. Part of the stream is random and part is
// biased towards words that invert, so that every mechanism of the scheme
// happens: inversion, entry into the mid-level, holding it while only the
// N-line changes, holding it across back-to-back inversions, and leaving it
// by a via-transition (0->M->1, 1->M->0) or a round transition (0->M->0,
// 1->M->1). Each is counted and must occur; no sub-bus may ever change both
// of its wires in one cycle. The coded bus must also make fewer effective
// transitions than the raw data (round transitions weighted one half).
module tb_tbic_link;
  import tbic_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned K = W / 2;
  localparam int          NWORDS = 20000;

  logic                clk = 1'b0;
  logic                rst_n;
  logic [W-1:0]        tx_data, rx_data, prev_tx, raw_prev;
  tbic_lines_t [K-1:0] bus_lines;
  logic                bus_plain;
  logic [K-1:0]        tx_inv, rx_inv, prev_inv;
  int                  checks = 0;
  int                  failures = 0;
  longint              raw = 0;
  longint              inversions = 0;
  longint              n_tr, dt, vt01, vt10, rt0, rt1, m_enter, m_hold, multi;

  tbic_link dut (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .rx_data(rx_data),
    .bus_lines(bus_lines), .bus_plain(bus_plain), .tx_inv(tx_inv), .rx_inv(rx_inv)
  );

  tbic_activity_monitor #(.K(K)) u_mon (
    .clk(clk), .rst_n(rst_n), .lines(bus_lines),
    .n_tr(n_tr), .dt(dt), .vt01(vt01), .vt10(vt10), .rt0(rt0), .rt1(rt1),
    .m_enter(m_enter), .m_hold(m_hold), .multi(multi)
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * (NWORDS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, longint n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  real p_b, p_ot, r;

  initial begin
    rst_n   = 1'b0;
    tx_data = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (rx_data !== '0 || bus_plain !== 1'b0) begin
      failures++;
      $display("bus not idle after reset");
    end
    rst_n    = 1'b1;
    prev_tx  = '0;
    raw_prev = '0;
    prev_inv = '0;
    for (int n = 0; n < NWORDS; n++) begin
      // Even quarters: uniform random. Odd quarters: each bit flips with
      // probability 3/4, so that inversions and held mid-levels are frequent.
      if ((n / (NWORDS / 4)) % 2 == 0) tx_data = W'({$urandom, $urandom});
      else tx_data = prev_tx ^ W'({$urandom, $urandom} | {$urandom, $urandom});
      raw += $countones(tx_data ^ raw_prev);
      raw_prev = tx_data;
      #1;
      inversions += $countones(tx_inv);
      prev_inv = tx_inv;
      @(posedge clk);
      #1;
      checks++;
      if (rx_data !== tx_data) begin
        failures++;
        if (failures < 10) $display("word %0d: received %h, sent %h", n, rx_data, tx_data);
      end
      checks++;
      if (rx_inv !== prev_inv) begin
        failures++;
        if (failures < 10) $display("word %0d: rx_inv %h, tx_inv was %h", n, rx_inv, prev_inv);
      end
      prev_tx  = tx_data;
    end
    @(negedge clk);
    @(negedge clk);
    expect_count("inversions", inversions);
    expect_count("mid-level entries", m_enter);
    expect_count("mid-level held cycles", m_hold);
    expect_count("direct transitions 0<->1", dt);
    expect_count("via-transitions 0->M->1", vt01);
    expect_count("via-transitions 1->M->0", vt10);
    expect_count("round transitions 0->M->0", rt0);
    expect_count("round transitions 1->M->1", rt1);
    expect_count("N-line transitions", n_tr);
    checks++;
    if (multi != 0) begin
      failures++;
      $display("%0d cycles changed both wires of a sub-bus", multi);
    end
    p_b  = 100.0 * real'(n_tr + dt + vt01 + vt10) / real'(raw);
    p_ot = 100.0 * real'(rt0 + rt1) / real'(raw);
    r    = 100.0 - p_b - p_ot / 2.0;
    $display("raw transitions %0d  P_B %0.2f%%  P_OT %0.2f%%  R %0.2f%%", raw, p_b, p_ot, r);
    checks++;
    if (r <= 0.0) begin
      failures++;
      $display("coding did not reduce transitions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
