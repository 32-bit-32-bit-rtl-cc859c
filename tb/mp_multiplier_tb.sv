// mp_multiplier_tb: self-checking test of the 32x32 multi-precision multiplier.
//
// For each precision class it presents operands in the matching register
// pair (the other pairs hold random garbage that the multiplier must ignore),
// pulses start and checks one clock later that done is high and p equals the
// product computed with 64-bit arithmetic in the testbench. Covers the
// published example pairs, all-ones operands of each width, and random
// operands. Also checks that p holds and done falls without a new start, and
// the packed modes: four independent 8x8 or two independent 16x16 products.
module mp_multiplier_tb;
  import dvfs_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  prec_e       prec = PREC_32;
  lanes_e      lanes = LANES_1;
  logic [7:0]  k1 = '0, k11 = '0;
  logic [15:0] k2 = '0, k22 = '0;
  logic [31:0] k3 = '0, k33 = '0;
  logic [63:0] p;
  logic        done;

  int checks = 0, failures = 0;

  mp_multiplier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(prec_e pr, logic [31:0] a, logic [31:0] b);
    longint unsigned expv;
    @(negedge clk);
    prec = pr;
    k1 = $urandom; k11 = $urandom; k2 = $urandom; k22 = $urandom;
    k3 = $urandom; k33 = $urandom;
    case (pr)
      PREC_8:  begin k1 = a[7:0];  k11 = b[7:0];  expv = longint'(a[7:0])  * longint'(b[7:0]);  end
      PREC_16: begin k2 = a[15:0]; k22 = b[15:0]; expv = longint'(a[15:0]) * longint'(b[15:0]); end
      default: begin k3 = a;       k33 = b;       expv = longint'(a) * longint'(b);             end
    endcase
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check("done one cycle after start", done, 1);
    check($sformatf("class %0d: %0d x %0d", pr, a, b), p, expv);
    @(negedge clk);
    check("done is a pulse", done, 0);
    check("product holds", p, expv);
  endtask

  // Packed lanes: operands in k3/k33, independent products side by side.
  task automatic run_lanes(lanes_e ln, prec_e pr, logic [31:0] a, logic [31:0] b);
    logic [63:0] expv;
    expv = '0;
    if (ln == LANES_4X8)
      for (int i = 0; i < 4; i++) expv[16*i +: 16] = a[8*i +: 8] * b[8*i +: 8];
    else
      for (int i = 0; i < 2; i++) expv[32*i +: 32] = a[16*i +: 16] * b[16*i +: 16];
    @(negedge clk);
    prec = pr; lanes = ln;
    k1 = $urandom; k11 = $urandom; k2 = $urandom; k22 = $urandom;
    k3 = a; k33 = b;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lanes = LANES_1;
    check("done one cycle after start (lanes)", done, 1);
    check($sformatf("lanes %0d: %h x %h", ln, a, b), p, expv);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("reset product", p, 0);
    rst_n = 1'b1;
    run(PREC_8, 23, 10);
    run(PREC_16, 6374, 99);
    run(PREC_32, 2378346, 1500058);
    run(PREC_32, 2678346, 1500058);
    run(PREC_8, 255, 255);
    run(PREC_16, 16'hFFFF, 16'hFFFF);
    run(PREC_32, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(PREC_NONE, 32'h1234_5678, 32'h9ABC_DEF0);
    repeat (300) run(prec_e'(1 + ($urandom % 3)), $urandom, $urandom);
    run_lanes(LANES_4X8, PREC_8, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run_lanes(LANES_2X16, PREC_16, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run_lanes(LANES_4X8, PREC_8, 32'h170A_8002, 32'h0A17_0280);
    repeat (200) run_lanes(($urandom % 2) ? LANES_4X8 : LANES_2X16,
                           prec_e'($urandom % 4), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
