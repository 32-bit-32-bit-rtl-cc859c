// mp_dvfs_top_tb: end-to-end test of the multi-precision DVFS multiplier.
//
// Runs the full system at its default parameters. Each operation presents
// two operands, waits for done and checks, against values computed here:
//  - the product (64-bit arithmetic);
//  - the scanned class (from the 128 / 32768 thresholds, larger class wins);
//  - the target voltage and frequency (1.2 V/25 MHz, 2.5 V/50 MHz,
//    3.3 V/100 MHz, or 3.3 V/100 MHz while the error feedback is high);
//  - that the modelled supply has reached the target when done arrives;
//  - the operating-clock rate measured afterwards (10, 20 or 40 rising edges
//    in 40 main-clock periods) and that the LED counter advanced by as many;
//  - that the operation finished within a latency bound.
// The operand sequence starts with the three published examples and then
// mixes classes and operand layouts (one pair, two 16-bit or four 8-bit
// packed lanes) at random. Every mechanism the design has is counted and a
// mechanism that never happened counts as a failure: each precision class,
// mixed-class pairs, raising and lowering the voltage, speeding up and
// slowing down the clock, the error-feedback override and both packed
// (parallel) layouts.
module mp_dvfs_top_tb;
  import dvfs_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start_i = 1'b0;
  lanes_e      lanes_i = LANES_1;
  logic [31:0] m1_i = '0, m2_i = '0;
  logic        razor_error_i = 1'b0;
  logic        ready_o, done_o;
  logic [63:0] product_o;
  prec_e       control_o;
  logic [11:0] voltage_mv_o, supply_mv_o;
  logic [7:0]  freq_mhz_o, scale_cycles_o;
  logic        clk_div2_o, clk_div4_o, op_clk_o;
  logic [3:0]  led_o;

  int checks = 0, failures = 0;

  mp_dvfs_top dut (.*);

  always #5 clk = ~clk;   // F = 100 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int op_rises = 0;
  always @(posedge op_clk_o) op_rises++;

  // Mechanism counters
  int n_class [4] = '{0, 0, 0, 0};
  int n_lanes8 = 0, n_lanes16 = 0;
  int n_mixed = 0, n_v_up = 0, n_v_down = 0, n_f_up = 0, n_f_down = 0, n_err = 0;

  function automatic int ref_class(longint unsigned v);
    if (v <= 128)   return 1;
    if (v <= 32768) return 2;
    return 3;
  endfunction

  int last_mv = 3300, last_mhz = 100;

  // Longest legal latency in main-clock cycles: 21 cycles of voltage slew,
  // 4 for the clock switch, then for an F/4 clock about 3 + 1 + 1 operating
  // cycles of crossing, multiply and return (4 main cycles each) plus 3.
  localparam int MAX_LAT = 21 + 4 + 5 * 4 + 8;

  task automatic operation(logic [31:0] a, logic [31:0] b, logic err,
                           lanes_e ln = LANES_1);
    int c1, c2, c, exp_mv, exp_mhz, lat, r0, l0, exp_rises;
    logic [63:0] exp_p;
    c1 = ref_class(a);
    c2 = ref_class(b);
    c  = (c1 > c2) ? c1 : c2;
    exp_p = longint'(a) * longint'(b);
    if (ln == LANES_4X8) begin
      c = 1;
      exp_p = '0;
      for (int i = 0; i < 4; i++) begin
        if (ref_class(a[8*i +: 8]) > c) c = ref_class(a[8*i +: 8]);
        if (ref_class(b[8*i +: 8]) > c) c = ref_class(b[8*i +: 8]);
        exp_p[16*i +: 16] = a[8*i +: 8] * b[8*i +: 8];
      end
    end else if (ln == LANES_2X16) begin
      c = 2;
      exp_p = '0;
      for (int i = 0; i < 2; i++) begin
        if (ref_class(a[16*i +: 16]) > c) c = ref_class(a[16*i +: 16]);
        if (ref_class(b[16*i +: 16]) > c) c = ref_class(b[16*i +: 16]);
        exp_p[32*i +: 32] = a[16*i +: 16] * b[16*i +: 16];
      end
    end
    exp_mv  = err ? 3300 : (c == 1 ? 1200 : c == 2 ? 2500 : 3300);
    exp_mhz = err ? 100  : (c == 1 ? 25   : c == 2 ? 50   : 100);

    while (!ready_o) @(negedge clk);
    @(negedge clk);
    razor_error_i = err;
    m1_i = a; m2_i = b; lanes_i = ln; start_i = 1'b1;
    @(negedge clk);
    start_i = 1'b0;
    m1_i = $urandom; m2_i = $urandom; lanes_i = lanes_e'($urandom % 3);
    lat = 1;
    while (!done_o && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    check($sformatf("latency bound (%0d cycles)", lat), lat <= MAX_LAT, 1);
    check($sformatf("product %0d x %0d (lanes %0d)", a, b, ln), product_o, exp_p);
    check("control", control_o, c);
    check("target voltage", voltage_mv_o, exp_mv);
    check("target frequency", freq_mhz_o, exp_mhz);
    check("supply at target", supply_mv_o, exp_mv);

    // Measure the operating clock while idle at this operating point.
    repeat (4) @(posedge clk);
    r0 = op_rises;
    l0 = led_o;
    repeat (40) @(posedge clk);
    exp_rises = exp_mhz == 25 ? 10 : exp_mhz == 50 ? 20 : 40;
    check("operating clock rate", op_rises - r0, exp_rises);
    check("LED counter advance", (led_o - l0) & 4'hF, exp_rises % 16);

    n_class[c]++;
    if (ln == LANES_4X8)   n_lanes8++;
    if (ln == LANES_2X16)  n_lanes16++;
    if (ln == LANES_1 && c1 != c2) n_mixed++;
    if (exp_mv > last_mv)  n_v_up++;
    if (exp_mv < last_mv)  n_v_down++;
    if (exp_mhz > last_mhz) n_f_up++;
    if (exp_mhz < last_mhz) n_f_down++;
    if (err && c != 3)     n_err++;
    last_mv  = exp_mv;
    last_mhz = exp_mhz;
    razor_error_i = 1'b0;
  endtask

  function automatic logic [31:0] rand_operand();
    case ($urandom % 3)
      0:       return $urandom % 129;
      1:       return $urandom % 32769;
      default: return $urandom;
    endcase
  endfunction

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %s: %0d", what, n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Published examples: 8-bit, 16-bit and 32-bit data.
    operation(23, 10, 1'b0);
    operation(6374, 99, 1'b0);
    operation(2378346, 1500058, 1'b0);
    // Mixed classes and edges.
    operation(128, 32768, 1'b0);
    operation(129, 5, 1'b0);
    operation(7, 32'hFFFF_FFFF, 1'b0);
    operation(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0);
    operation(0, 0, 1'b0);
    // Error feedback forces the full operating point for small operands.
    operation(23, 10, 1'b1);
    operation(6374, 99, 1'b0);
    // Parallel mode: four 8x8 and two 16x16 independent products.
    operation(32'h170A_8002, 32'h0A17_0280, 1'b0, LANES_4X8);
    operation(32'h18E6_0063, 32'h0063_18E6, 1'b0, LANES_2X16);
    operation(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, LANES_4X8);
    repeat (80) operation(rand_operand(), rand_operand(), ($urandom % 8) == 0,
                          ($urandom % 4 == 0) ? lanes_e'(1 + $urandom % 2) : LANES_1);

    need("8-bit operations", n_class[1]);
    need("16-bit operations", n_class[2]);
    need("32-bit operations", n_class[3]);
    need("mixed-class operand pairs", n_mixed);
    need("voltage raised", n_v_up);
    need("voltage lowered", n_v_down);
    need("clock sped up", n_f_up);
    need("clock slowed down", n_f_down);
    need("error feedback override", n_err);
    need("parallel 4x8 lanes", n_lanes8);
    need("parallel 2x16 lanes", n_lanes16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
