// freq_scaling_unit_tb: self-checking test of the JK divider and clock select.
//
// Checks, against a cycle counter kept in the testbench:
//  - clk_div2 and clk_div4 follow the ripple-divider sequence F/2 and F/4
//    from reset;
//  - for each target the operating clock has 10, 20 or 40 rising edges in 40
//    main-clock periods (F/4, F/2, F);
//  - a new target is applied within four main-clock periods;
//  - over many random switches, every high and low phase of the operating
//    clock lasts at least half a main-clock period (no runt pulses), and
//    every rising edge of the operating clock falls on a rising edge of clk.
module freq_scaling_unit_tb;
  import dvfs_pkg::*;

  localparam realtime HALF = 5ns;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  prec_e target_prec = PREC_32;
  logic  clk_div2, clk_div4, op_clk;
  prec_e applied_prec;

  int checks = 0, failures = 0;

  freq_scaling_unit dut (.*);

  always #(HALF) clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Pulse-width monitor on the operating clock.
  realtime last_edge = 0;
  realtime min_phase = 1e9;
  int      op_rises = 0;
  int      misaligned = 0;
  always @(op_clk) if (rst_n) begin
    if (last_edge > 0 && ($realtime - last_edge) < min_phase) min_phase = $realtime - last_edge;
    last_edge = $realtime;
  end
  always @(posedge op_clk) if (rst_n) begin
    op_rises++;
    if (clk !== 1'b1) misaligned++;
  end

  prec_e seq [5] = '{PREC_8, PREC_16, PREC_32, PREC_16, PREC_8};

  int div2_rises = 0, div4_rises = 0;
  always @(posedge clk_div2) div2_rises++;
  always @(posedge clk_div4) div4_rises++;

  task automatic set_target(prec_e p);
    int waited = 0;
    @(negedge clk);
    target_prec = p;
    while (applied_prec != p) begin
      @(negedge clk);
      waited++;
    end
    checks++;
    if (waited > 4) begin
      failures++;
      $display("FAIL switch to %0d took %0d cycles", p, waited);
    end
  endtask

  initial begin
    int cnt;
    int r2, r4, ro;
    repeat (3) @(negedge clk);
    check("div2 after reset", clk_div2, 0);
    check("div4 after reset", clk_div4, 0);
    rst_n = 1'b1;
    // Divider sequence
    cnt = 0;
    repeat (32) begin
      @(posedge clk);
      cnt++;
      @(negedge clk);
      check($sformatf("div2 cnt=%0d", cnt), clk_div2, cnt & 1);
      check($sformatf("div4 cnt=%0d", cnt), clk_div4, ((cnt + 1) >> 1) & 1);
    end
    // Rates: edges of clk_div2 / clk_div4 over 40 main cycles
    r2 = div2_rises; r4 = div4_rises;
    repeat (40) @(posedge clk);
    check("div2 rate", div2_rises - r2, 20);
    check("div4 rate", div4_rises - r4, 10);
    // Operating clock rate per target
    foreach (seq[i]) begin
      set_target(seq[i]);
      repeat (4) @(posedge clk);
      ro = op_rises;
      repeat (40) @(posedge clk);
      check($sformatf("op_clk rate for class %0d", seq[i]), op_rises - ro,
            seq[i] == PREC_8 ? 10 : seq[i] == PREC_16 ? 20 : 40);
    end
    // Code 0 is served at full clock
    set_target(PREC_8);
    @(negedge clk);
    target_prec = PREC_NONE;
    repeat (5) @(negedge clk);
    check("code 0 applies full clock", applied_prec, PREC_32);
    // Random switching, glitch check
    min_phase = 1e9;
    repeat (300) begin
      @(negedge clk);
      target_prec = prec_e'(1 + ($urandom % 3));
      repeat ($urandom % 7) @(negedge clk);
    end
    checks++;
    if (min_phase < HALF) begin
      failures++;
      $display("FAIL runt pulse on op_clk: %0t", min_phase);
    end
    check("op_clk rising edges off clk edge", misaligned, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
