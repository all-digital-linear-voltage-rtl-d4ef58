// tb_control_logic: checks the driver commands against the truth table of the
// push and pull drivers for every Q1/Q2 code, with random group enables, and
// checks that a disabled group or a disabled regulator keeps its devices off
// and that no code turns both drivers of one gate on.
`timescale 1ps/1fs
module tb_control_logic;
  import dlvr_pkg::*;

  ded_res_t res;
  logic en;
  logic [NUM_GROUPS-1:0] grp_en;
  drv_t [NUM_GROUPS-1:0] push_drv;
  drv_t pull_drv;

  control_logic dut (.res(res), .en(en), .grp_en(grp_en),
                     .push_drv(push_drv), .pull_drv(pull_drv));

  int checks = 0, failures = 0;

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
    for (int it = 0; it < 64; it++) begin
      for (int code = 0; code < 4; code++) begin
        for (int e = 0; e < 2; e++) begin
          logic [1:0] c;
          logic mpc, mpdisc, mnc, mndisc;
          c = 2'(code);
          res = '{q1: c[1], q2: c[0]};
          en = 1'(e);
          grp_en = NUM_GROUPS'($urandom);
          #10;
          // Table of an enabled push group and of the pull device.
          case (c)
            2'b11:   begin mpc = 0; mpdisc = 1; mnc = 0; mndisc = 1; end
            2'b01:   begin mpc = 0; mpdisc = 0; mnc = 0; mndisc = 1; end
            2'b00:   begin mpc = 1; mpdisc = 0; mnc = 1; mndisc = 0; end
            default: begin mpc = 1; mpdisc = 0; mnc = 1; mndisc = 0; end // 1 0 taken as too high
          endcase
          if (!en) begin mpc = 1; mpdisc = 0; mnc = 0; mndisc = 1; end
          for (int g = 0; g < NUM_GROUPS; g++) begin
            if (grp_en[g]) begin
              check(push_drv[g].pc_on == mpc && push_drv[g].disc_on == mpdisc,
                    $sformatf("push group %0d code %b en %0d", g, c, en));
            end else begin
              check(push_drv[g].pc_on && !push_drv[g].disc_on,
                    $sformatf("disabled group %0d must stay off", g));
            end
            check(!(push_drv[g].pc_on && push_drv[g].disc_on), "push driver contention");
          end
          check(pull_drv.pc_on == mnc && pull_drv.disc_on == mndisc,
                $sformatf("pull drivers code %b en %0d", c, en));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
