// tbic_activity_monitor: testbench helper that classifies the wire activity
// of K TBIC sub-buses.
//
// Samples the bus once per cycle (on the falling clock edge, when the lines
// are settled) and counts, summed over all sub-buses:
//   n_tr   N-line transitions (all data transitions)
//   dt     M-line direct transitions 0<->1
//   vt01   via-transitions 0->M->1, vt10: 1->M->0 (one data transition each,
//          same energy as a direct transition)
//   rt0    round transitions 0->M->0, rt1: 1->M->1 (overhead: each costs
//          about half a full swing when the mid-level is VDD/2)
//   m_enter  entries into the mid-level, m_hold: cycles the M-line stays there
//   multi  cycles in which both wires of a sub-bus changed (must stay 0)
// A visit to the mid-level is classified when the line leaves it, by
// comparing the level it left from with the level it goes to.
module tbic_activity_monitor
  import tbic_pkg::*;
#(
  parameter int unsigned K = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tbic_lines_t [K-1:0] lines,
  output longint              n_tr,
  output longint              dt,
  output longint              vt01,
  output longint              vt10,
  output longint              rt0,
  output longint              rt1,
  output longint              m_enter,
  output longint              m_hold,
  output longint              multi
);

  tbic_lines_t [K-1:0] prev;
  logic [K-1:0]        origin;  // binary level the M-line left to enter M

  always @(negedge clk) begin
    if (!rst_n) begin
      prev    <= lines;
      origin  <= '0;
      n_tr    <= 0; dt <= 0; vt01 <= 0; vt10 <= 0; rt0 <= 0; rt1 <= 0;
      m_enter <= 0; m_hold <= 0; multi <= 0;
    end else begin
      automatic longint a_n = 0, a_dt = 0, a_v01 = 0, a_v10 = 0, a_r0 = 0, a_r1 = 0;
      automatic longint a_me = 0, a_mh = 0, a_mu = 0;
      for (int i = 0; i < K; i++) begin
        automatic bit m_chg = (lines[i].m != prev[i].m);
        automatic bit n_chg = (lines[i].n != prev[i].n);
        if (n_chg) a_n++;
        if (m_chg && n_chg) a_mu++;
        if (!prev[i].m.mid && !lines[i].m.mid && m_chg) a_dt++;
        if (!prev[i].m.mid && lines[i].m.mid) begin
          a_me++;
          origin[i] <= prev[i].m.val;
        end
        if (prev[i].m.mid && lines[i].m.mid) a_mh++;
        if (prev[i].m.mid && !lines[i].m.mid) begin
          case ({origin[i], lines[i].m.val})
            2'b01: a_v01++;
            2'b10: a_v10++;
            2'b00: a_r0++;
            default: a_r1++;
          endcase
        end
      end
      prev    <= lines;
      n_tr    <= n_tr + a_n;
      dt      <= dt + a_dt;
      vt01    <= vt01 + a_v01;
      vt10    <= vt10 + a_v10;
      rt0     <= rt0 + a_r0;
      rt1     <= rt1 + a_r1;
      m_enter <= m_enter + a_me;
      m_hold  <= m_hold + a_mh;
      multi   <= multi + a_mu;
    end
  end

endmodule
