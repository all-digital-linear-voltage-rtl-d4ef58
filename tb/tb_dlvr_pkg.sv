// tb_dlvr_pkg: checks the shared constants, the struct bit layouts and the
// two helper functions of the regulator package.
//   - level_volts(k) must give 0.5 V + k x 0.1 V for the six levels.
//   - divider_ratio(k) times level_volts(k) must equal the 0.5 V reference
//     for every level, because that is what the loop regulates to.
//   - ded_res_t must pack q1 in the upper bit, and drv_t must pack pc_on in
//     the upper bit, because other blocks build these from bit vectors.
// There is no DUT module; the package is the thing under test.
`timescale 1ps/1fs
module tb_dlvr_pkg;
  import dlvr_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #(100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  initial begin
    ded_res_t r;
    drv_t d;
    automatic real tap [6] = '{1.0, 5.0/6.0, 5.0/7.0, 5.0/8.0, 5.0/9.0, 0.5};

    check(NUM_LEVELS == 6, "six levels");
    check(NUM_GROUPS == 6, "six push groups");
    check($bits(level_t) == 3, "level code is 3 bits");

    for (int k = 0; k < 6; k++) begin
      check(near(level_volts(k), 0.5 + 0.1 * k), $sformatf("level_volts(%0d)", k));
      check(near(divider_ratio(k), tap[k]), $sformatf("divider_ratio(%0d)", k));
      check(near(divider_ratio(k) * level_volts(k), 0.5),
            $sformatf("level %0d divides to 0.5 V", k));
    end
    // The ratio must fall strictly as the level rises.
    for (int k = 1; k < 6; k++)
      check(divider_ratio(k) < divider_ratio(k - 1), $sformatf("ratio falls at %0d", k));

    r = 2'b10;
    check(r.q1 == 1'b1 && r.q2 == 1'b0, "ded_res_t packs q1 high");
    r = '{q1: 1'b0, q2: 1'b1};
    check(r == 2'b01, "ded_res_t hold code is 01");
    d = 2'b10;
    check(d.pc_on == 1'b1 && d.disc_on == 1'b0, "drv_t packs pc_on high");
    check($bits(ded_res_t) == 2 && $bits(drv_t) == 2, "struct widths");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
