// tb_dlvr_decap_sweep: full-load undershoot of the regulator for three
// decoupling capacitors (1.5, 3 and 4.5 nF), single and dual control, at all
// six output levels, plus a triple-detector variant at 3 nF.
//
// Four regulators run side by side on the same stimulus. For every level and
// control type the output settles with no load, then a 100 mA load is applied
// and the lowest output over the next 60 ns is recorded. The table printed at
// the end is the model's counterpart of an undershoot-versus-capacitor table.
// Checks (trends that follow from charge balance, not absolute values):
//   - every configuration regulates: full-load mean within 25 mV of the
//     target at 4.5 nF, 35 mV at 3 nF and 60 mV at 1.5 nF,
//   - per level and type, undershoot shrinks as the capacitor grows
//     (1.5 nF > 4.5 nF, and the 3 nF value lies in between within 5 mV),
//   - the interleaved undershoot summed over levels stays within 15 % of the
//     single type's for every capacitor (the 130 ps of extra switch delay
//     cancels most of the halved sampling delay in this model), and three
//     detectors do no worse than 5 mV per level above two.
`timescale 1ps/1fs
module tb_dlvr_decap_sweep;
  import dlvr_pkg::*;

  localparam int NC = 4;   // 1.5 nF, 3 nF, 4.5 nF (two detectors), 3 nF (three)

  logic   rst_n = 1'b0, en = 1'b0, interleave = 1'b0;
  level_t level = '0;
  real    vref = 0.5, i_load = 0.0;
  real    vreg [NC], vcmp [NC];
  ded_res_t res [NC];
  logic [1:0] sel [NC];
  logic [NUM_GROUPS-1:0] grp_en [NC], push_on [NC];
  logic pull_on [NC], contention [NC];

  dlvr_top #(.C_DECAP_F(1.5e-9)) u15 (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[0]), .vcmp(vcmp[0]), .res(res[0]), .sel(sel[0]), .grp_en(grp_en[0]),
    .push_on(push_on[0]), .pull_on(pull_on[0]), .contention(contention[0]));
  dlvr_top #(.C_DECAP_F(3.0e-9)) u30 (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[1]), .vcmp(vcmp[1]), .res(res[1]), .sel(sel[1]), .grp_en(grp_en[1]),
    .push_on(push_on[1]), .pull_on(pull_on[1]), .contention(contention[1]));
  dlvr_top #(.C_DECAP_F(4.5e-9)) u45 (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[2]), .vcmp(vcmp[2]), .res(res[2]), .sel(sel[2]), .grp_en(grp_en[2]),
    .push_on(push_on[2]), .pull_on(pull_on[2]), .contention(contention[2]));
  dlvr_top #(.C_DECAP_F(3.0e-9), .N_DED(3)) u30t (.rst_n, .en, .interleave, .level, .vref,
    .i_load, .vreg(vreg[3]), .vcmp(vcmp[3]), .res(res[3]), .sel(sel[3]), .grp_en(grp_en[3]),
    .push_on(push_on[3]), .pull_on(pull_on[3]), .contention(contention[3]));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  meas = 1'b0;
  real s_sum [NC], s_min [NC];
  int  s_n;
  always #10 if (meas) begin
    s_n++;
    for (int c = 0; c < NC; c++) begin
      s_sum[c] += vreg[c];
      if (vreg[c] < s_min[c]) s_min[c] = vreg[c];
    end
  end

  real us [2][6][NC];   // undershoot [dual][level][config], volts
  localparam real TOL [NC] = '{0.060, 0.035, 0.025, 0.035};  // allowed mean error (V)

  initial begin
    string cname [NC] = '{"1.5nF", "3nF  ", "4.5nF", "3nF/3"};
    real sum_us [2][NC];
    #1000 rst_n = 1'b1;
    #1000 en = 1'b1;
    for (int d = 0; d < 2; d++) begin
      interleave = 1'(d);
      for (int lv = 0; lv < NUM_LEVELS; lv++) begin
        real tgt;
        tgt = 0.5 + 0.1 * lv;
        level = level_t'(lv);
        i_load = 0.0;
        #(60_000);
        for (int c = 0; c < NC; c++) begin s_sum[c] = 0.0; s_min[c] = 10.0; end
        s_n = 0;
        i_load = 0.1;
        meas = 1'b1;
        #(60_000);
        meas = 1'b0;
        for (int c = 0; c < NC; c++) begin
          us[d][lv][c] = tgt - s_min[c];
          // Smaller capacitors swing further and pull the full-load mean down.
          check(s_sum[c] / s_n > tgt - TOL[c] && s_sum[c] / s_n < tgt + TOL[c],
                $sformatf("%s %s level %0d mean %.4f", cname[c], d ? "dual" : "single",
                          lv, s_sum[c] / s_n));
        end
      end
    end
    $display("full-load undershoot (mV)      1.0V   0.9V   0.8V   0.7V   0.6V   0.5V");
    for (int c = 0; c < NC; c++) begin
      for (int d = 0; d < 2; d++) begin
        if (c == 3 && d == 0) continue;
        $display("%s %-6s            %6.1f %6.1f %6.1f %6.1f %6.1f %6.1f", cname[c],
                 d ? (c == 3 ? "triple" : "dual") : "single",
                 us[d][5][c] * 1e3, us[d][4][c] * 1e3, us[d][3][c] * 1e3,
                 us[d][2][c] * 1e3, us[d][1][c] * 1e3, us[d][0][c] * 1e3);
      end
    end
    for (int d = 0; d < 2; d++) begin
      for (int c = 0; c < NC; c++) sum_us[d][c] = 0.0;
      for (int lv = 0; lv < NUM_LEVELS; lv++) begin
        check(us[d][lv][0] > us[d][lv][2],
              $sformatf("level %0d %s: 1.5 nF undershoot above 4.5 nF", lv, d ? "dual" : "single"));
        check(us[d][lv][1] < us[d][lv][0] + 0.005 && us[d][lv][1] > us[d][lv][2] - 0.005,
              $sformatf("level %0d %s: 3 nF undershoot between the others", lv, d ? "dual" : "single"));
        for (int c = 0; c < NC; c++) sum_us[d][c] += us[d][lv][c];
      end
    end
    for (int c = 0; c < 3; c++)
      check(sum_us[1][c] < 1.15 * sum_us[0][c],
            $sformatf("%s: interleaved undershoot within 15 %% of single", cname[c]));
    check(sum_us[1][3] < sum_us[1][1] + 0.005 * NUM_LEVELS, "three detectors no worse than two");
    for (int c = 0; c < NC; c++) check(!contention[c], "no driver contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
