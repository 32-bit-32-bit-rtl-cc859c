// op_sequencer_tb: self-checking test of the operation sequencer.
//
// Plays the roles of the scaling units and the multiplier. For each
// operation it checks: load is a single pulse with start while ready;
// no multiplier request is issued until both v_ok and clk_ok are high (each
// is held low for a random number of cycles); exactly one request is
// issued; scale_cycles reports the wait; start is ignored while busy; done
// pulses once, one cycle after the completion pulse, and ready returns.
module op_sequencer_tb;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic       v_ok = 1'b1;
  logic       clk_ok = 1'b1;
  logic       mul_done = 1'b0;
  logic       ready, load, mul_req, done;
  logic [7:0] scale_cycles;

  int checks = 0, failures = 0;

  op_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic operation(int v_wait, int c_wait, int m_wait);
    int n, reqs;
    @(negedge clk);
    check("ready before start", ready, 1);
    v_ok = 1'b0; clk_ok = 1'b0;
    start = 1'b1;
    #1 check("load with start", load, 1);
    @(negedge clk);
    start = 1'b1;   // held high: must not reload while busy
    #1 check("no load while busy", load, 0);
    check("not ready while busy", ready, 0);
    reqs = 0;
    n = 0;
    while (reqs == 0) begin
      v_ok   = (n >= v_wait);
      clk_ok = (n >= c_wait);
      #1;
      if (mul_req) begin
        reqs++;
        check("request only at operating point", v_ok && clk_ok, 1);
      end
      check("no load while scaling", load, 0);
      @(negedge clk);
      n++;
      if (n > 300) break;
    end
    start = 1'b0;
    check("cycles until request", n - 1, (v_wait > c_wait) ? v_wait : c_wait);
    check("scale_cycles", scale_cycles, (v_wait > c_wait) ? v_wait : c_wait);
    repeat (m_wait) begin
      #1 check("single request", mul_req, 0);
      check("no done before completion", done, 0);
      @(negedge clk);
    end
    mul_done = 1'b1;
    @(negedge clk);
    mul_done = 1'b0;
    check("done after completion", done, 1);
    check("ready after completion", ready, 1);
    @(negedge clk);
    check("done is a pulse", done, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("ready after reset", ready, 1);
    operation(0, 0, 1);
    operation(21, 3, 5);
    operation(2, 13, 2);
    repeat (50) operation($urandom % 25, $urandom % 5, 1 + $urandom % 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
