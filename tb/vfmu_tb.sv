// vfmu_tb: self-checking test of the voltage and frequency management unit.
//
// Drives every control code with the error feedback low and high and
// compares the voltage (mV), frequency (MHz) and clock target with the
// operating-point table written out here: 1 -> 1200 mV / 25 MHz,
// 2 -> 2500 mV / 50 MHz, 3 -> 3300 mV / 100 MHz, and full point on error.
module vfmu_tb;
  import dvfs_pkg::*;

  prec_e       control;
  logic        err;
  prec_e       target_prec;
  logic [11:0] target_mv;
  logic [7:0]  target_mhz;

  int checks = 0, failures = 0;

  vfmu dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int exp_mv  [4] = '{3300, 1200, 2500, 3300};
  int exp_mhz [4] = '{100, 25, 50, 100};
  int exp_sel [4] = '{3, 1, 2, 3};

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 4; c++) begin
        control = prec_e'(c);
        err     = e[0];
        #1;
        check($sformatf("mv c=%0d e=%0d", c, e),  target_mv,   e ? 3300 : exp_mv[c]);
        check($sformatf("mhz c=%0d e=%0d", c, e), target_mhz,  e ? 100  : exp_mhz[c]);
        check($sformatf("sel c=%0d e=%0d", c, e), target_prec, e ? 3    : exp_sel[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
