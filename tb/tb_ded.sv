// tb_ded: checks the digital error detector. A self-oscillating detector and
// a second one triggered 300 ps later (as in dual interleaved control) both
// compare VCMP with a 0.5 V reference. Expected Q1/Q2 follow the three-band
// table: well below the reference 1 1, within the resolution 0 1, well above
// 0 0. The band edges lie where the delay difference equals one 10 ps
// inverter, +/-4.39 mV from the reference; the test points avoid them.
// Also checked: the 600 ps trigger period, the 300 ps lag of the second
// detector, that a new VCMP is reflected within 1.5 trigger periods, and that
// EN low stops the oscillator and freezes the result.
`timescale 1ps/1fs
module tb_ded;
  import dlvr_pkg::*;

  logic rst_n = 1'b0, en = 1'b0;
  real  vref = 0.5, vcmp = 0.5;
  logic trig0, trig1, ph0, ph1;
  ded_res_t r0, r1;

  ded #(.SELF_OSC(1'b1)) u0 (.rst_n(rst_n), .en(en), .vref(vref), .vcmp(vcmp),
    .trig_in(1'b0), .trig_out(trig0), .res(r0), .cap_phase(ph0));
  ded #(.SELF_OSC(1'b0), .TRIG_DELAY_PS(280.0)) u1 (.rst_n(rst_n), .en(en), .vref(vref),
    .vcmp(vcmp), .trig_in(trig0), .trig_out(trig1), .res(r1), .cap_phase(ph1));

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

  int n_trig = 0;
  always @(trig0 or trig1) n_trig++;

  function automatic ded_res_t expected(input real v);
    if (v < 0.5 - 0.00439) return 2'b11;
    if (v > 0.5 + 0.00439) return 2'b00;
    return 2'b01;
  endfunction

  initial begin
    realtime t0, t1, tr;
    ded_res_t snap0, snap1;
    real vs [11] = '{0.0, 0.40, 0.49, 0.494, 0.497, 0.5, 0.503, 0.506, 0.51, 0.6, 1.1};
    #100 rst_n = 1'b1;
    #100 en = 1'b1;
    #3000;
    // Trigger period over ten cycles.
    @(posedge trig0); t0 = $realtime;
    repeat (10) @(posedge trig0);
    t1 = $realtime;
    check((t1 - t0) / 10.0 > 599.0 && (t1 - t0) / 10.0 < 601.0,
          $sformatf("trigger period %.2f ps", (t1 - t0) / 10.0));
    @(posedge trig0); t0 = $realtime;
    @(posedge trig1); t1 = $realtime;
    check(t1 - t0 > 299.0 && t1 - t0 < 301.0, $sformatf("second detector lag %.2f ps", t1 - t0));
    // Comparison bands.
    for (int i = 0; i < 11; i++) begin
      vcmp = vs[i];
      #2000;
      check(r0 == expected(vs[i]), $sformatf("DED0 VCMP %.3f: Q %b expected %b", vs[i], r0, expected(vs[i])));
      check(r1 == expected(vs[i]), $sformatf("DED1 VCMP %.3f: Q %b expected %b", vs[i], r1, expected(vs[i])));
    end
    // Response latency from a VCMP step to a new result.
    vcmp = 0.45;
    #3000;
    tr = $realtime;
    vcmp = 0.55;
    wait (r0 == 2'b00);
    check($realtime - tr <= 900.0, $sformatf("result latency %.1f ps", $realtime - tr));
    // Disable: oscillator stops, result frozen.
    en = 1'b0;
    #2000;
    snap0 = r0; snap1 = r1;
    vcmp = 0.45;
    n_trig = 0;
    #3000;
    check(n_trig == 0, $sformatf("stopped oscillator toggled %0d times", n_trig));
    check(r0 == snap0 && r1 == snap1, $sformatf("result frozen while disabled: %b %b", r0, r1));
    // Re-enable restarts.
    en = 1'b1;
    #3000;
    check(r0 == 2'b11 && r1 == 2'b11, "restart after enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
