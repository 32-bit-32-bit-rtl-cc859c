// voltage_scaling_unit_tb: self-checking test of the supply regulator model.
//
// From the 3.3 V reset level, requests 1.2 V, 2.5 V, 3.3 V, 1.2 V and checks
// every cycle of each transition against a reference that moves 100 mV per
// clock toward the target and stops on it. Checks the number of cycles each
// transition takes (21 for 3.3 V <-> 1.2 V, 13 for 1.2 V -> 2.5 V, 8 for
// 2.5 V -> 3.3 V) and that v_ok is high exactly when the supply is on target.
module voltage_scaling_unit_tb;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [11:0] target_mv = 12'd3300;
  logic [11:0] supply_mv;
  logic        v_ok;

  int checks = 0, failures = 0;

  voltage_scaling_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
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

  task automatic go(int mv, int exp_cycles);
    int model, n;
    model = supply_mv;
    @(negedge clk);
    target_mv = 12'(mv);
    n = 0;
    #1 check("v_ok low while off target", v_ok, model == mv);
    while (model != mv) begin
      @(negedge clk);
      n++;
      if (model < mv) model = (mv - model > 100) ? model + 100 : mv;
      else            model = (model - mv > 100) ? model - 100 : mv;
      check($sformatf("supply step %0d toward %0d", n, mv), supply_mv, model);
      check("v_ok", v_ok, model == mv);
    end
    check($sformatf("cycles to %0d mV", mv), n, exp_cycles);
    repeat (3) @(negedge clk);
    check("holds on target", supply_mv, mv);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("reset level", supply_mv, 3300);
    rst_n = 1'b1;
    go(1200, 21);
    go(2500, 13);
    go(3300, 8);
    go(1200, 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
