// tb_dlvr_top: end-to-end test of the regulator at its default parameters
// (two detectors, 4.5 nF, 120 mA push design current).
//
// For every output level, first with the single control type and then with
// the dual interleaved type, the test switches the mode, lets the output
// settle with no load, measures it, applies a 100 mA load step and measures
// again. Expected values are worked out here from the level code alone:
// target = 0.5 V + 0.1 V * level. Checks per phase:
//   - the mean output is within 25 mV of the target (no load and full load),
//   - the ripple stays inside target -80 mV / +120 mV,
//   - the right push groups are enabled (accumulative, Table-style),
//   - no gate ever sees both of its drivers on.
// It also checks that the single type never switches detectors, that the
// dual type alternates them twice per 600 ps trigger period, that in dual mode
// the control logic always receives the selected detector's result, and that
// the worst full-load undershoot summed over the levels with interleaving is
// within 15 % of the single type's. Every mechanism of the design (push on, hold, pull on, a
// floating gate that kept a push device on, mode switch, detector switch,
// load step) must occur at least once.
`timescale 1ps/1fs
module tb_dlvr_top;
  import dlvr_pkg::*;

  logic   rst_n = 1'b0, en = 1'b0, interleave = 1'b0;
  level_t level = '0;
  real    vref = 0.5, i_load = 0.0;
  real    vreg, vcmp;
  ded_res_t res;
  logic [1:0] sel;
  logic [NUM_GROUPS-1:0] grp_en, push_on;
  logic pull_on, contention;

  dlvr_top dut (.*);

  int checks = 0, failures = 0;
  int n_push = 0, n_hold = 0, n_pull = 0, n_hold_on = 0;
  int n_mode = 0, n_sel = 0, n_load = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    #(5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  always @(res) begin
    if (res == 2'b11) n_push++;
    if (res == 2'b01) begin
      n_hold++;
      if (push_on[0]) n_hold_on++;
    end
    if (res == 2'b00) n_pull++;
  end
  always @(sel) n_sel++;

  // In dual mode the result used must always be the selected detector's.
  int n_sw_checks = 0, n_sw_bad = 0;
  always #37 if (en && interleave) begin
    n_sw_checks++;
    if (dut.u_ctl.res != dut.ded_res[sel]) n_sw_bad++;
  end

  // Sampling of the output every 10 ps during a measurement window.
  bit  meas = 1'b0;
  real s_sum, s_min, s_max;
  int  s_n;
  always #10 if (meas) begin
    s_sum += vreg; s_n++;
    if (vreg < s_min) s_min = vreg;
    if (vreg > s_max) s_max = vreg;
  end

  task automatic measure(input int ns, output real mean, output real vmin, output real vmax);
    s_sum = 0.0; s_n = 0; s_min = 10.0; s_max = -10.0;
    meas = 1'b1;
    #(ns * 1000);
    meas = 1'b0;
    mean = s_sum / s_n; vmin = s_min; vmax = s_max;
  endtask

  real undershoot_sum [2];

  task automatic run_level(input int lv, input bit dual);
    real tgt, mean, vmin, vmax;
    logic [NUM_GROUPS-1:0] exp_en;
    int sel0;
    tgt = 0.5 + 0.1 * lv;
    level = level_t'(lv); n_mode++;
    i_load = 0.0;
    #(80_000);
    for (int g = 0; g < NUM_GROUPS; g++) exp_en[g] = (g <= lv);
    check(grp_en == exp_en, $sformatf("group enables at level %0d", lv));
    measure(60, mean, vmin, vmax);
    $display("%s level %0d (%.1f V) no load : mean %.4f min %.4f max %.4f",
             dual ? "dual  " : "single", lv, tgt, mean, vmin, vmax);
    check(mean > tgt - 0.025 && mean < tgt + 0.025, $sformatf("no-load mean at %.1f V", tgt));
    check(vmin > tgt - 0.080 && vmax < tgt + 0.120, $sformatf("no-load ripple at %.1f V", tgt));
    // Full load step.
    sel0 = n_sel;
    i_load = 0.1; n_load++;
    measure(80, mean, vmin, vmax);
    $display("%s level %0d (%.1f V) 100 mA  : mean %.4f min %.4f max %.4f",
             dual ? "dual  " : "single", lv, tgt, mean, vmin, vmax);
    check(mean > tgt - 0.025 && mean < tgt + 0.025, $sformatf("full-load mean at %.1f V", tgt));
    check(vmin > tgt - 0.080 && vmax < tgt + 0.120, $sformatf("full-load ripple at %.1f V", tgt));
    undershoot_sum[dual] += tgt - vmin;
    if (dual) begin
      // 80 ns at two switches per 600 ps = about 267 select changes.
      check(n_sel - sel0 >= 250 && n_sel - sel0 <= 280,
            $sformatf("dual select rate: %0d changes in 80 ns", n_sel - sel0));
    end else begin
      check(n_sel == sel0, "single type must not switch detectors");
    end
  endtask

  initial begin
    undershoot_sum[0] = 0.0; undershoot_sum[1] = 0.0;
    #(1000);
    rst_n = 1'b1;
    #(1000);
    en = 1'b1;
    interleave = 1'b0;
    for (int lv = 0; lv < NUM_LEVELS; lv++) run_level(lv, 1'b0);
    interleave = 1'b1;
    for (int lv = 0; lv < NUM_LEVELS; lv++) run_level(lv, 1'b1);
    $display("summed worst undershoot: single %.4f V, dual %.4f V",
             undershoot_sum[0], undershoot_sum[1]);
    // Dual halves the sampling delay but adds 130 ps of switch delay; the
    // average loop delay barely moves, so only "not much worse" is required.
    check(undershoot_sum[1] < 1.15 * undershoot_sum[0], "interleaving keeps undershoot within 15 %");
    check(n_sw_checks > 1000 && n_sw_bad == 0,
          $sformatf("control logic follows the selected detector: %0d of %0d samples wrong",
                    n_sw_bad, n_sw_checks));
    check(!contention, "no driver contention");
    $display("mechanisms: push %0d hold %0d pull %0d hold-kept-on %0d mode %0d detector-switch %0d load-step %0d",
             n_push, n_hold, n_pull, n_hold_on, n_mode, n_sel, n_load);
    check(n_push > 0, "push-on occurred");
    check(n_hold > 0, "hold occurred");
    check(n_pull > 0, "pull-on occurred");
    check(n_hold_on > 0, "hold with push device kept on occurred");
    check(n_mode > 0, "mode switch occurred");
    check(n_sel > 0, "detector switch occurred");
    check(n_load > 0, "load step occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
