// operand_scanner_tb: self-checking test of the operand scanner.
//
// Applies the three worked examples of the published design (23 x 10 ->
// class 1, 6374 x 99 -> class 2, 2378346 x 1500058 -> class 3), the values on
// both sides of each threshold, mixed-class pairs and random pairs of random
// magnitude. The expected class and register contents are computed in the
// testbench from the thresholds with 64-bit integer arithmetic. Packed-lane
// operands (two 16-bit or four 8-bit lanes per word) are checked the same way,
// lane by lane. Also checks that the outputs hold while load is low.
module operand_scanner_tb;
  import dvfs_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  lanes_e      lanes = LANES_1;
  lanes_e      lanes_q;
  logic [31:0] m1 = '0, m2 = '0;
  prec_e       control;
  logic [7:0]  k1, k11;
  logic [15:0] k2, k22;
  logic [31:0] k3, k33;

  int checks = 0, failures = 0;

  operand_scanner dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_class(longint unsigned v);
    if (v <= 128)   return 1;
    if (v <= 32768) return 2;
    return 3;
  endfunction

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(logic [31:0] a, logic [31:0] b, lanes_e ln = LANES_1);
    int c;
    c = (ref_class(a) > ref_class(b)) ? ref_class(a) : ref_class(b);
    if (ln == LANES_4X8) begin
      c = 1;
      for (int i = 0; i < 4; i++) begin
        if (ref_class((a >> (8 * i)) & 255) > c) c = ref_class((a >> (8 * i)) & 255);
        if (ref_class((b >> (8 * i)) & 255) > c) c = ref_class((b >> (8 * i)) & 255);
      end
    end else if (ln == LANES_2X16) begin
      c = 2;
      for (int i = 0; i < 2; i++) begin
        if (ref_class((a >> (16 * i)) & 65535) > c) c = ref_class((a >> (16 * i)) & 65535);
        if (ref_class((b >> (16 * i)) & 65535) > c) c = ref_class((b >> (16 * i)) & 65535);
      end
    end
    @(negedge clk);
    m1 = a; m2 = b; load = 1'b1; lanes = ln;
    @(negedge clk);
    load = 1'b0;
    m1 = $urandom; m2 = $urandom;   // must not disturb the captured values
    lanes = lanes_e'($urandom % 3);
    check($sformatf("control %0d x %0d lanes %0d", a, b, ln), control, c);
    check("lanes_q", lanes_q, ln);
    if (ln == LANES_1) begin
      check("k1",  k1,  c == 1 ? a : 0);
      check("k11", k11, c == 1 ? b : 0);
      check("k2",  k2,  c == 2 ? a : 0);
      check("k22", k22, c == 2 ? b : 0);
      check("k3",  k3,  c == 3 ? a : 0);
      check("k33", k33, c == 3 ? b : 0);
    end else begin
      check("packed k1",  k1,  0);
      check("packed k11", k11, 0);
      check("packed k2",  k2,  0);
      check("packed k22", k22, 0);
      check("packed k3",  k3,  a);
      check("packed k33", k33, b);
    end
    @(negedge clk);
    check("hold control", control, c);
    check("hold k3", k3, (c == 3 || ln != LANES_1) ? a : 0);
  endtask

  logic [31:0] edges [10] = '{0, 1, 127, 128, 129, 32767, 32768, 32769,
                              32'h8000_0000, 32'hFFFF_FFFF};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("reset control", control, 0);
    // Published examples
    apply(23, 10);
    apply(6374, 99);
    apply(2378346, 1500058);
    apply(2678346, 1500058);
    // Threshold edges in every combination
    foreach (edges[i]) foreach (edges[j]) apply(edges[i], edges[j]);
    // Packed lanes: 4x8 with small and large bytes, 2x16 with small and large halves
    apply(32'h0A17_8005, 32'h8080_0102, LANES_4X8);    // all bytes <= 128 -> class 1
    apply(32'h0A17_8105, 32'h8080_0102, LANES_4X8);    // a byte of 129 -> class 2
    apply(32'h0017_0005, 32'h0003_0004, LANES_2X16);   // small halves -> still class 2
    apply(32'h8001_0005, 32'h0003_0004, LANES_2X16);   // a half of 32769 -> class 3
    apply(32'h8000_8000, 32'h8000_8000, LANES_2X16);   // halves of 32768 -> class 2
    repeat (200) apply($urandom >> ($urandom % 32), $urandom >> ($urandom % 32),
                       ($urandom % 2) ? LANES_4X8 : LANES_2X16);
    // Random magnitudes
    repeat (200) begin
      logic [31:0] a, b;
      a = $urandom >> ($urandom % 32);
      b = $urandom >> ($urandom % 32);
      apply(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
