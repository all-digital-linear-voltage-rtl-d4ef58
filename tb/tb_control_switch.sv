// tb_control_switch: drives the C2 phase levels of two and of three
// interleaved detectors as they occur in operation (50 % duty, falling edges
// T/N apart) and checks that the switch always passes the detector whose C2
// fell last, that it passes detector 0 in single mode, and that each detector
// is passed exactly once per trigger period.
`timescale 1ps/1fs
module tb_control_switch;
  import dlvr_pkg::*;

  localparam real T = 600.0;

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

  // Two detectors.
  ded_res_t [1:0] r2;
  logic [1:0] p2;
  logic il2;
  ded_res_t o2;
  logic [1:0] s2;
  control_switch #(.N_DED(2)) dut2 (.res_in(r2), .cap_phase(p2), .interleave(il2),
                                    .res_out(o2), .sel(s2));

  // Three detectors.
  ded_res_t [2:0] r3;
  logic [2:0] p3;
  logic il3;
  ded_res_t o3;
  logic [1:0] s3;
  control_switch #(.N_DED(3)) dut3 (.res_in(r3), .cap_phase(p3), .interleave(il3),
                                    .res_out(o3), .sel(s3));

  // C2 of detector k at time t: falls at k*T/N (mod T), low for T/2.
  function automatic logic phase(input real t, input int k, input int n);
    real x;
    x = t - real'(k) * T / real'(n);
    while (x < 0.0) x += T;
    while (x >= T) x -= T;
    return (x >= T / 2.0);
  endfunction

  function automatic int freshest(input real t, input int n);
    real x;
    x = t;
    while (x >= T) x -= T;
    return int'($floor(x / (T / real'(n))));
  endfunction

  initial begin
    int cnt2 [2];
    cnt2 = '{0, 0};
    r2 = '{2'b11, 2'b00};   // detector 1 says too low, detector 0 too high
    r3 = '{2'b01, 2'b11, 2'b00};
    il2 = 1'b1; il3 = 1'b1;
    // Sample away from the switching instants: 10 ps after each multiple of T/6.
    for (int i = 0; i < 24; i++) begin
      real t;
      t = real'(i) * T / 6.0 + 10.0;
      for (int k = 0; k < 2; k++) p2[k] = phase(t, k, 2);
      for (int k = 0; k < 3; k++) p3[k] = phase(t, k, 3);
      #10;
      check(int'(s2) == freshest(t, 2), $sformatf("N=2 t=%.0f sel %0d", t, s2));
      check(o2 == r2[freshest(t, 2)], "N=2 result follows select");
      check(int'(s3) == freshest(t, 3), $sformatf("N=3 t=%.0f sel %0d", t, s3));
      check(o3 == r3[freshest(t, 3)], "N=3 result follows select");
      if (i % 3 == 0) cnt2[s2]++;
    end
    // 24 samples cover 4 periods; sampled every T/2, each detector seen 4 times.
    check(cnt2[0] == 4 && cnt2[1] == 4, "N=2: each detector once per half period");
    // Single mode: always detector 0.
    il2 = 1'b0; il3 = 1'b0;
    for (int i = 0; i < 12; i++) begin
      real t;
      t = real'(i) * T / 6.0 + 10.0;
      for (int k = 0; k < 2; k++) p2[k] = phase(t, k, 2);
      for (int k = 0; k < 3; k++) p3[k] = phase(t, k, 3);
      #10;
      check(s2 == 0 && o2 == r2[0], "N=2 single mode passes detector 0");
      check(s3 == 0 && o3 == r3[0], "N=3 single mode passes detector 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
