// tb_mode_indicator: exhaustive test of the level decoder. The expected
// divider switch and push-group enables are written out as a table, one row
// per level: 0.5 V closes the ratio-1 switch and enables group 1 only, 1.0 V
// closes the 1/2 switch and enables all six groups. Unused codes must behave
// like 0.5 V.
`timescale 1ps/1fs
module tb_mode_indicator;
  import dlvr_pkg::*;

  level_t level;
  logic [NUM_LEVELS-1:0] div_sel;
  logic [NUM_GROUPS-1:0] grp_en;

  mode_indicator dut (.level(level), .div_sel(div_sel), .grp_en(grp_en));

  int checks = 0, failures = 0;

  // Expected rows for codes 0..7: {div_sel, grp_en}, bit 0 = first switch / group 1.
  localparam logic [5:0] EXP_SEL [8] = '{6'b000001, 6'b000010, 6'b000100, 6'b001000,
                                        6'b010000, 6'b100000, 6'b000001, 6'b000001};
  localparam logic [5:0] EXP_EN  [8] = '{6'b000001, 6'b000011, 6'b000111, 6'b001111,
                                        6'b011111, 6'b111111, 6'b000001, 6'b000001};

  initial begin
    #(100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      level = level_t'(c);
      #10;
      checks++;
      if (div_sel !== EXP_SEL[c]) begin
        failures++;
        $display("FAIL: code %0d div_sel %b expected %b", c, div_sel, EXP_SEL[c]);
      end
      checks++;
      if (grp_en !== EXP_EN[c]) begin
        failures++;
        $display("FAIL: code %0d grp_en %b expected %b", c, grp_en, EXP_EN[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
