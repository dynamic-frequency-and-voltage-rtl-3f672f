// ad_domain_checker -- scoreboard for one controlled domain. It accumulates
// the queue occupancy it is given between interval pulses (saturating at
// 16 bits, as the design does), feeds each finished interval and its cycle
// count to the reference model, and at each update compares frequency,
// decision, frequency point and voltage. It also checks that the update
// arrives 58 (rescale) or 40 (hold) cycles after the pulse, and counts each
// decision and saturated interval.
`timescale 1ns / 1ps
module ad_domain_checker
  import mcd_dvfs_pkg::*;
  import ad_ref_pkg::*;
#(
  parameter string NAME = "dom"
) (
  input logic        clk,
  input logic        rst_n,
  input logic        pulse,
  input int unsigned occ,
  input int unsigned cycles,
  input logic [15:0] f_q,
  input ad_mode_e    mode,
  input logic [8:0]  f_point,
  input logic [10:0] v_mv,
  input logic        update
);
  int checks = 0, failures = 0, n_sat = 0, n_updates = 0;
  int mode_seen[6];
  ad_state_t st = reset_state();
  ad_cfg_t   cfg = default_cfg();
  longint unsigned acc = 0;
  longint unsigned q_u[$], q_c[$];
  int since = -1;

  always @(posedge clk) begin
    if (!rst_n) begin
      acc = 0;
    end else begin
      acc += occ;
      if (acc > 65535) acc = 65535;
      if (pulse) begin
        if (acc == 65535) n_sat++;
        q_u.push_back(acc);
        q_c.push_back(cycles);
        acc = 0;
        since = 0;
      end else if (since >= 0) since++;
      if (update) begin
        ad_mode_e em;
        real mhz, pt;
        int ept, ev;
        n_updates++;
        if (q_u.size() == 0) begin
          failures++; $display("FAIL %s update without interval", NAME);
        end else begin
          em = step(st, cfg, q_u.pop_front(), q_c.pop_front());
          mode_seen[int'(em)]++;
          mhz = st.f / 64.0;
          pt  = (mhz - 250.0) * 319.0 / 750.0;
          ept = int'($floor(pt + 0.5));
          ev  = int'($floor(650.0 + ept * 550.0 / 319.0 + 0.5));
          checks++;
          if (f_q != 16'(st.f) || mode != em || f_point != 9'(ept) || v_mv != 11'(ev)) begin
            failures++;
            $display("FAIL %s f=%0d/%0d mode=%s/%s point=%0d/%0d v=%0d/%0d", NAME, f_q, st.f,
                     mode.name(), em.name(), f_point, ept, v_mv, ev);
          end
          checks++;
          if (since != ((em == AD_HOLD) ? 40 : 58)) begin
            failures++; $display("FAIL %s latency %0d", NAME, since);
          end
        end
        since = -1;
      end
    end
  end
endmodule
