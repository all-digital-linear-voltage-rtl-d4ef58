// tb_phase_comparator: builds C1 and C2 pulses whose falling edges are 20 ps
// apart and moves the rising edge of D0 across them. D0 rising before C1
// falls must give Q1 Q2 = 1 1, between the two falling edges 0 1, after C2
// 0 0. Also checks the reset value 0 1 and that the outputs only change on
// the sampling edges.
`timescale 1ps/1fs
module tb_phase_comparator;
  import dlvr_pkg::*;

  logic rst_n, d0, c1, c2;
  ded_res_t res;

  phase_comparator dut (.rst_n(rst_n), .d0(d0), .c1(c1), .c2(c2), .res(res));

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

  // One comparison: C1 falls at 300, C2 at 320; D0 rises at 300 + off.
  task automatic compare(input real off, output ded_res_t r);
    d0 = 1'b0; c1 = 1'b1; c2 = 1'b1;
    fork
      begin #(300.0 + off) d0 = 1'b1; end
      begin #(300.0) c1 = 1'b0; end
      begin #(320.0) c2 = 1'b0; end
    join
    #100;
    r = res;
  endtask

  initial begin
    ded_res_t r, exp_r;
    d0 = 1'b1; c1 = 1'b0; c2 = 1'b0;
    rst_n = 1'b1;
    #10;
    rst_n = 1'b0;
    #10;
    check(res == 2'b01, "reset to hold code");
    rst_n = 1'b1;
    #10;
    // Rising clock edges must not sample.
    c1 = 1'b1; c2 = 1'b1; #10;
    check(res == 2'b01, "no capture on rising C1/C2");
    for (int i = 0; i < 60; i++) begin
      real off;
      off = -200.0 + real'($urandom_range(0, 4000)) / 10.0;  // -200 .. +200 ps
      if (off > -1.0 && off < 1.0) off = 5.0;
      if (off > 19.0 && off < 21.0) off = 30.0;
      compare(off, r);
      if (off < 0.0)       exp_r = 2'b11;
      else if (off < 20.0) exp_r = 2'b01;
      else                 exp_r = 2'b00;
      check(r == exp_r, $sformatf("D0 offset %.1f ps: Q %b expected %b", off, r, exp_r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
