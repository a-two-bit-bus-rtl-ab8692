// tbic_width_run: testbench helper that streams random words through one
// tbic_link of width W and measures its wire activity.
//
// On start it sends NWORDS uniformly random words, checks that each returns
// one cycle later, and then reports, as percentages of the raw transitions
// (bit changes between consecutive words of the uncoded stream):
//   P_B  data transitions on the coded bus: N-line transitions, direct
//        transitions and via-transitions of the M-line
//   P_OT overhead transitions: round transitions of the M-line
//   R    reduction ratio, 100 - (P_B + P_OT/2), counting a round transition
//        as half a full swing (mid-level at VDD/2)
// done rises when the results are valid; errors counts mismatched words.
module tbic_width_run
  import tbic_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int          NWORDS = 1000
) (
  input  logic   clk,
  input  logic   start,
  output logic   done,
  output int     errors,
  output real    p_b,
  output real    p_ot,
  output real    p_dt,
  output real    p_vt,
  output real    r
);

  localparam int unsigned K = W / 2;

  logic                rst_n;
  logic [W-1:0]        tx_data, rx_data, prev;
  tbic_lines_t [K-1:0] bus_lines;
  logic                bus_plain;
  logic [K-1:0]        tx_inv, rx_inv;
  longint              raw;
  longint              n_tr, dt, vt01, vt10, rt0, rt1, m_enter, m_hold, multi;

  tbic_link #(.WIDTH(W)) u_link (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .rx_data(rx_data),
    .bus_lines(bus_lines), .bus_plain(bus_plain), .tx_inv(tx_inv), .rx_inv(rx_inv)
  );

  tbic_activity_monitor #(.K(K)) u_mon (
    .clk(clk), .rst_n(rst_n), .lines(bus_lines),
    .n_tr(n_tr), .dt(dt), .vt01(vt01), .vt10(vt10), .rt0(rt0), .rt1(rt1),
    .m_enter(m_enter), .m_hold(m_hold), .multi(multi)
  );

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < W; i += 32) w = (w << 32) | W'($urandom);
    return w;
  endfunction

  initial begin
    done    = 1'b0;
    errors  = 0;
    raw     = 0;
    rst_n   = 1'b0;
    tx_data = '0;
    wait (start);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev  = '0;
    for (int n = 0; n < NWORDS; n++) begin
      tx_data = rand_word();
      raw += $countones(tx_data ^ prev);
      prev = tx_data;
      @(posedge clk);
      #1;
      if (rx_data !== tx_data) errors++;
    end
    // Leave the last word on the bus so that a pending mid-level visit is
    // closed before the counters are read (a repeated word never enters M).
    repeat (2) @(negedge clk);
    if (multi != 0) errors++;
    p_b  = 100.0 * real'(n_tr + dt + vt01 + vt10) / real'(raw);
    p_dt = 100.0 * real'(n_tr + dt) / real'(raw);
    p_vt = 100.0 * real'(vt01 + vt10) / real'(raw);
    p_ot = 100.0 * real'(rt0 + rt1) / real'(raw);
    r    = 100.0 - p_b - p_ot / 2.0;
    done = 1'b1;
  end

endmodule
