// tb_dlvr_line: line regulation of the regulator. Three regulators with the
// 4.5 nF capacitor and single control run side by side on the same stimulus,
// with the output devices on a 1.1 V supply and on supplies 10 % lower and
// 10 % higher (0.99 V and 1.21 V). The devices are sized for 1.1 V in all
// three.
//
// At 1.21 V all six levels are run at the full 100 mA load. A 0.99 V supply
// leaves too little headroom for 100 mA (the push devices have 20 % margin at
// 1.1 V, and their current falls faster than the supply), so at 0.99 V the
// test uses levels 0.5 V to 0.8 V with a 50 mA load; 0.9 V and 1.0 V need more
// headroom than 0.99 V leaves at any useful load.
//
// Checks: at every point the mean output stays within 25 mV of the target,
// and it moves by less than 20 mV from the mean at the nominal supply under
// the same load. The detector is taken as supply-independent here.
`timescale 1ps/1fs
module tb_dlvr_line;
  import dlvr_pkg::*;

  localparam int NS = 3;   // supplies: nominal, -10 %, +10 %

  logic   rst_n = 1'b0, en = 1'b0, interleave = 1'b0;
  level_t level = '0;
  real    vref = 0.5, i_load = 0.0;
  real    vreg [NS], vcmp [NS];
  ded_res_t res [NS];
  logic [1:0] sel [NS];
  logic [NUM_GROUPS-1:0] grp_en [NS], push_on [NS];
  logic pull_on [NS], contention [NS];

  dlvr_top u_nom (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[0]), .vcmp(vcmp[0]), .res(res[0]), .sel(sel[0]), .grp_en(grp_en[0]),
    .push_on(push_on[0]), .pull_on(pull_on[0]), .contention(contention[0]));
  dlvr_top #(.VDD_RUN(0.99)) u_low (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[1]), .vcmp(vcmp[1]), .res(res[1]), .sel(sel[1]), .grp_en(grp_en[1]),
    .push_on(push_on[1]), .pull_on(pull_on[1]), .contention(contention[1]));
  dlvr_top #(.VDD_RUN(1.21)) u_high (.rst_n, .en, .interleave, .level, .vref, .i_load,
    .vreg(vreg[2]), .vcmp(vcmp[2]), .res(res[2]), .sel(sel[2]), .grp_en(grp_en[2]),
    .push_on(push_on[2]), .pull_on(pull_on[2]), .contention(contention[2]));

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
  real s_sum [NS];
  int  s_n;
  always #10 if (meas) begin
    s_n++;
    for (int s = 0; s < NS; s++) s_sum[s] += vreg[s];
  end

  // Settle at the given level and load, then return the mean of each supply.
  task automatic run_point(input int lv, input real load, output real mean [NS]);
    level  = level_t'(lv);
    i_load = load;
    #(60_000);
    for (int s = 0; s < NS; s++) s_sum[s] = 0.0;
    s_n  = 0;
    meas = 1'b1;
    #(60_000);
    meas = 1'b0;
    for (int s = 0; s < NS; s++) mean[s] = s_sum[s] / s_n;
  endtask

  initial begin
    real mean [NS];
    real tgt;
    #1000 rst_n = 1'b1;
    #1000 en = 1'b1;
    #(100_000);   // charge the output from 0 V with no load first
    $display("level  load   mean @1.10 V  @0.99 V  @1.21 V");
    for (int lv = 0; lv < NUM_LEVELS; lv++) begin
      tgt = level_volts(lv);
      // Full load: nominal against +10 %.
      run_point(lv, 0.1, mean);
      $display("%.1f V  100 mA  %.4f       -        %.4f", tgt, mean[0], mean[2]);
      check(mean[2] > tgt - 0.025 && mean[2] < tgt + 0.025,
            $sformatf("+10 %% supply, %.1f V, 100 mA: mean %.4f", tgt, mean[2]));
      check(mean[2] - mean[0] < 0.020 && mean[0] - mean[2] < 0.020,
            $sformatf("+10 %% supply moves the %.1f V mean by under 20 mV", tgt));
      // Half load: nominal against -10 %, where the headroom allows it.
      if (lv <= 3) begin
        run_point(lv, 0.05, mean);
        $display("%.1f V   50 mA  %.4f       %.4f   -", tgt, mean[0], mean[1]);
        check(mean[1] > tgt - 0.025 && mean[1] < tgt + 0.025,
              $sformatf("-10 %% supply, %.1f V, 50 mA: mean %.4f", tgt, mean[1]));
        check(mean[1] - mean[0] < 0.020 && mean[0] - mean[1] < 0.020,
              $sformatf("-10 %% supply moves the %.1f V mean by under 20 mV", tgt));
      end
    end
    for (int s = 0; s < NS; s++) check(!contention[s], "no driver contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
