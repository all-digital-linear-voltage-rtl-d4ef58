// tb_output_stage: checks the output-stage model against currents worked out
// here from the device equations.
//   - A driver command reaches the gate 450 ps later (580 ps on the long
//     path of interleaved control), not earlier.
//   - Push group 1 alone at 0.5 V charges 4.5 nF with 120 mA (sized for the
//     0.5 V level); all six groups at 1.0 V also give 120 mA, while group 1
//     alone at 1.0 V gives only about a quarter of that.
//   - With both drivers off the gate holds: the device stays on or off.
//   - The pull device discharges with k/2 * V * (2*(VDD-VTH) - V).
//   - A 100 mA load alone discharges at 100 mA / 4.5 nF.
//   - Both drivers of one gate on raises the contention flag.
`timescale 1ps/1fs
module tb_output_stage;
  import dlvr_pkg::*;

  localparam real C = 4.5e-9;

  drv_t [5:0] pa, pb, pc;
  drv_t       la, lb, lc;
  real        ia = 0.0, ib = 0.0, ic = 0.0;
  logic       lp = 1'b0;
  real        va, vb, vc;
  logic [5:0] pona, ponb, ponc;
  logic       lona, lonb, lonc, ca, cb, cc;

  output_stage #(.V_INIT(0.5)) ua (.push_drv(pa), .pull_drv(la), .i_load(ia), .long_path(lp), .vreg(va),
                                   .push_on(pona), .pull_on(lona), .contention(ca));
  output_stage #(.V_INIT(1.0)) ub (.push_drv(pb), .pull_drv(lb), .i_load(ib), .long_path(1'b0), .vreg(vb),
                                   .push_on(ponb), .pull_on(lonb), .contention(cb));
  output_stage #(.V_INIT(1.0)) uc (.push_drv(pc), .pull_drv(lc), .i_load(ic), .long_path(1'b0), .vreg(vc),
                                   .push_on(ponc), .pull_on(lonc), .contention(cc));

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

  localparam drv_t OFF_P = '{pc_on: 1'b1, disc_on: 1'b0};  // push off / pull on
  localparam drv_t ON_P  = '{pc_on: 1'b0, disc_on: 1'b1};  // push on  / pull off
  localparam drv_t FLOAT = '{pc_on: 1'b0, disc_on: 1'b0};
  localparam drv_t BOTH  = '{pc_on: 1'b1, disc_on: 1'b1};

  function automatic bit near(input real a, input real b, input real tol);
    return (a > b * (1.0 - tol)) && (a < b * (1.0 + tol));
  endfunction

  // Measured current from the slope over `ps` picoseconds.
  task automatic slope(ref real v, input int ps, output real i);
    real v0;
    v0 = v;
    #(ps);
    i = (v - v0) * C / (real'(ps) * 1.0e-12);
  endtask

  initial begin
    real i, v0, k0;
    pa = {6{OFF_P}}; la = ON_P;   // everything off
    pb = {6{OFF_P}}; lb = ON_P;
    pc = {6{OFF_P}}; lc = ON_P;
    #1000;
    check(va > 0.4999 && va < 0.5001, "idle output holds");
    // Propagation delay of a command.
    pa[0] = ON_P;
    #440;
    check(pona[0] == 1'b0, "gate not yet switched at 440 ps");
    #20;
    check(pona[0] == 1'b1, "gate switched by 460 ps");
    check(pona[5:1] == '0, "other groups untouched");
    // Group 1 at 0.5 V: 120 mA.
    slope(va, 100, i);
    check(near(i, 0.12, 0.03), $sformatf("group 1 at 0.5 V: %.4f A", i));
    // Hold: both drivers off, device stays on and keeps charging.
    pa[0] = FLOAT;
    #1000;
    check(pona[0] == 1'b1, "floating gate keeps push device on");
    slope(va, 100, i);
    k0 = 0.12 / (0.5 * 0.6 * 0.9);
    check(near(i, k0 * 0.5 * (1.1 - va) * (1.1 + va - 0.7), 0.03),
          $sformatf("held device still pushes: %.4f A", i));
    // Push off, pull on.
    pa[0] = OFF_P; la = OFF_P;
    #500;
    check(pona[0] == 1'b0 && lona == 1'b1, "push off, pull on");
    v0 = va;
    slope(va, 100, i);
    check(near(-i, 0.5 * 0.4 * v0 * (1.5 - v0), 0.03), $sformatf("pull current %.4f A", -i));
    // Pull floats: stays on.
    la = FLOAT;
    #500;
    check(lona == 1'b1, "floating pull gate holds");
    la = ON_P;
    #500;
    check(lona == 1'b0, "pull off");
    // Load alone.
    ia = 0.1;
    slope(va, 200, i);
    check(near(-i, 0.1, 0.01), $sformatf("load current %.4f A", -i));
    ia = 0.0;
    // Sizing at 1.0 V: all six groups vs group 1 alone.
    pb = {6{ON_P}};
    pc[0] = ON_P;
    #460;
    slope(vb, 50, i);
    check(near(i, 0.12, 0.03), $sformatf("six groups at 1.0 V: %.4f A", i));
    slope(vc, 50, i);
    check(near(i, k0 * 0.5 * 0.1 * 1.4, 0.05), $sformatf("group 1 alone at 1.0 V: %.4f A", i));
    // Contention.
    check(!ca, "no contention yet");
    pa[3] = BOTH;
    #500;
    check(ca && pona[3] == 1'b0, "both drivers on: flagged, device off");
    // Long path: 580 ps.
    lp = 1'b1;
    pa[4] = ON_P;
    #570;
    check(pona[4] == 1'b0, "long path: not yet switched at 570 ps");
    #20;
    check(pona[4] == 1'b1, "long path: switched by 590 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
