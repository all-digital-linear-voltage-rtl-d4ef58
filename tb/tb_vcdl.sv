// tb_vcdl: measures the delay of the voltage-controlled delay cell for both
// edge directions at several control voltages and compares it with the
// expected line 270 ps + 2280 ps/V * (VC - 0.5 V) and its clamps. It also
// checks that a 5 mV deviation moves the delay by more than one 10.29 ps
// inverter delay, and that edges closer together than the delay are all kept.
`timescale 1ps/1fs
module tb_vcdl;
  logic in = 1'b0, out;
  real  vc = 0.5;

  vcdl dut (.in(in), .vc(vc), .out(out));

  int checks = 0, failures = 0;
  realtime t_in;

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


  function automatic real expected(input real v);
    real d;
    d = 270.0 + 2280.0 * (v - 0.5);
    if (d < 20.0) d = 20.0;
    if (d > 520.0) d = 520.0;
    return d;
  endfunction

  task automatic measure(input real v, output real d);
    vc = v;
    #1000;
    in = ~in; t_in = $realtime;
    @(out);
    d = $realtime - t_in;
    #1000;
  endtask

  initial begin
    real d, d_lo, d_hi;
    real vs [8] = '{0.0, 0.3, 0.45, 0.495, 0.5, 0.505, 0.55, 1.0};
    for (int i = 0; i < 8; i++) begin
      for (int e = 0; e < 2; e++) begin
        measure(vs[i], d);
        check(d > expected(vs[i]) - 0.01 && d < expected(vs[i]) + 0.01,
              $sformatf("VC %.3f: delay %.2f expected %.2f", vs[i], d, expected(vs[i])));
      end
    end
    measure(0.5, d_lo);
    measure(0.505, d_hi);
    check(d_hi - d_lo > 10.29, $sformatf("5 mV gives %.2f ps, more than one inverter", d_hi - d_lo));
    // Pulse train with 100 ps spacing through a 270 ps delay: all edges kept.
    vc = 0.5;
    #1000;
    begin
      int n_out;
      n_out = 0;
      fork
        begin repeat (6) begin #100 in = ~in; end end
        begin repeat (6) begin @(out); n_out++; end end
        begin #2000; end
      join_any
      #1000;
      check(n_out == 6, $sformatf("all 6 edges kept, saw %0d", n_out));
      check(out == in, "output settles to input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
