// tb_voltage_divider: for random output voltages and every switch, checks that
// VCMP = VREG * ratio with ratios 1, 5/6, 5/7, 5/8, 5/9, 1/2, and that each
// level's nominal voltage divides to exactly the 0.5 V reference.
`timescale 1ps/1fs
module tb_voltage_divider;
  import dlvr_pkg::*;

  real vreg, vcmp;
  logic [NUM_LEVELS-1:0] sel;

  voltage_divider dut (.vreg(vreg), .sel(sel), .vcmp(vcmp));

  int checks = 0, failures = 0;
  localparam real RATIO [6] = '{1.0, 5.0/6.0, 5.0/7.0, 5.0/8.0, 5.0/9.0, 0.5};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(1_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) begin
      sel = 6'(1 << k);
      vreg = 0.5 + 0.1 * k;
      #10;
      check(vcmp > 0.49999 && vcmp < 0.50001, $sformatf("level %0d divides to %.5f", k, vcmp));
      for (int i = 0; i < 20; i++) begin
        vreg = real'($urandom_range(0, 1100)) / 1000.0;
        #10;
        check(vcmp > vreg * RATIO[k] - 1e-9 && vcmp < vreg * RATIO[k] + 1e-9,
              $sformatf("switch %0d VREG %.3f VCMP %.5f", k, vreg, vcmp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
