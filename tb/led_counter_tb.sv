// led_counter_tb: self-checking test of the 4-bit LED counter.
//
// Checks the count after reset, then on every clock edge for 40 edges
// against a reference counter (covering the wrap from 15 to 0), and that a
// reset in mid-count returns it to zero.
module led_counter_tb;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] count;

  int checks = 0, failures = 0;

  led_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
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

  initial begin
    int model;
    repeat (2) @(negedge clk);
    check("reset", count, 0);
    rst_n = 1'b1;
    model = 0;
    repeat (40) begin
      @(negedge clk);
      model = (model + 1) % 16;
      check("count", count, model);
    end
    rst_n = 1'b0;
    #1 check("async reset", count, 0);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("count after reset", count, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
