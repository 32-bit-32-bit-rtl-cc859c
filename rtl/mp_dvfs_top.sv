// mp_dvfs_top: 32x32 multi-precision multiplier with operand scanning and
// dynamic voltage and frequency scaling.
//
// Each operand pair is first scanned. Its magnitude picks a precision class
// (8, 16 or 32 bits) and the operands are scheduled into registers of that
// width. The voltage and frequency management unit (VFMU) turns the class into
// an operating point: 1.2 V at F/4, 2.5 V at F/2 or 3.3 V at F, with
// F = 100 MHz. A regulator model slews the supply to the target voltage. A
// two-JK-flip-flop divider gives F/2 and F/4, and a glitch-free select makes
// the operating clock. The multiplier then runs on that clock and uses only
// the 8x8 blocks the precision needs. A 4-bit counter on the operating clock
// drives LEDs, so the clock rate can be seen.
//
// Interface (main clock domain unless noted):
//   start_i/m1_i/m2_i : begin a multiplication of m1_i * m2_i (unsigned);
//                       sampled when ready_o is high.
//   lanes_i           : sampled with start_i. LANES_1 multiplies one pair;
//                       LANES_2X16 / LANES_4X8 treat m1_i, m2_i as packed
//                       16-bit or 8-bit operands and return the independent
//                       lane products side by side in product_o (32 or 16
//                       bits per lane).
//   razor_error_i     : timing-error feedback from the multiplier's error
//                       detectors to the VFMU; while high the VFMU asks for
//                       the full operating point.
//   done_o            : one-cycle pulse; product_o is valid from then until
//                       the next start.
//   control_o, voltage_mv_o, freq_mhz_o, supply_mv_o : the operating point,
//                       for a display.
//   clk_div2_o, clk_div4_o, op_clk_o : the divided clocks and the scaled clock.
//   led_o             : the LED counter on the scaled clock.
// An operation takes the scaling time (up to 4 clocks for the clock switch,
// 100 mV per clock for the supply model) plus about 2-3 operating-clock
// cycles each way for the domain crossings and one for the multiply.
module mp_dvfs_top
  import dvfs_pkg::*;
(
  input  logic                 clk,            // main clock F (100 MHz)
  input  logic                 rst_n,          // asynchronous, active low
  input  logic                 start_i,
  input  lanes_e               lanes_i,        // operand layout: one pair, 2x16 or 4x8 packed lanes
  input  logic [31:0]          m1_i,           // multiplicand
  input  logic [31:0]          m2_i,           // multiplier
  input  logic                 razor_error_i,  // error signal feedback
  output logic                 ready_o,
  output logic                 done_o,
  output logic [63:0]          product_o,
  output prec_e                control_o,      // scanned precision class
  output logic [MV_WIDTH-1:0]  voltage_mv_o,   // target supply voltage, mV
  output logic [MHZ_WIDTH-1:0] freq_mhz_o,     // target operating frequency, MHz
  output logic [MV_WIDTH-1:0]  supply_mv_o,    // modelled supply voltage, mV
  output logic [7:0]           scale_cycles_o, // cycles the last operation waited for its operating point
  output logic                 clk_div2_o,     // F/2 from the divider
  output logic                 clk_div4_o,     // F/4 from the divider
  output logic                 op_clk_o,
  output logic [3:0]           led_o
);

  // Operand scanner
  logic        load;
  prec_e       control;
  lanes_e      lanes;
  logic [7:0]  k1, k11;
  logic [15:0] k2, k22;
  logic [31:0] k3, k33;

  // Operating point
  prec_e                target_prec, applied_prec;
  logic [MV_WIDTH-1:0]  target_mv;
  logic [MV_WIDTH-1:0]  supply_mv;
  logic                 v_ok;
  logic                 clk_div2, clk_div4, op_clk;

  // Multiplier handshake
  logic        mul_req, mul_start, mul_done_op, mul_done;
  logic [63:0] product;

  op_sequencer u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start_i),
    .v_ok         (v_ok),
    .clk_ok       (applied_prec == target_prec),
    .mul_done     (mul_done),
    .ready        (ready_o),
    .load         (load),
    .mul_req      (mul_req),
    .done         (done_o),
    .scale_cycles (scale_cycles_o)
  );

  operand_scanner u_ios (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .lanes   (lanes_i),
    .m1      (m1_i),
    .m2      (m2_i),
    .control (control),
    .lanes_q (lanes),
    .k1      (k1),
    .k11     (k11),
    .k2      (k2),
    .k22     (k22),
    .k3      (k3),
    .k33     (k33)
  );

  vfmu u_vfmu (
    .control     (control),
    .err         (razor_error_i),
    .target_prec (target_prec),
    .target_mv   (target_mv),
    .target_mhz  (freq_mhz_o)
  );

  voltage_scaling_unit u_vsu (
    .clk       (clk),
    .rst_n     (rst_n),
    .target_mv (target_mv),
    .supply_mv (supply_mv),
    .v_ok      (v_ok)
  );

  freq_scaling_unit u_fsu (
    .clk          (clk),
    .rst_n        (rst_n),
    .target_prec  (target_prec),
    .clk_div2     (clk_div2),
    .clk_div4     (clk_div4),
    .applied_prec (applied_prec),
    .op_clk       (op_clk)
  );

  pulse_sync u_req_sync (
    .src_clk   (clk),
    .src_rst_n (rst_n),
    .src_pulse (mul_req),
    .dst_clk   (op_clk),
    .dst_rst_n (rst_n),
    .dst_pulse (mul_start)
  );

  mp_multiplier u_mul (
    .clk   (op_clk),
    .rst_n (rst_n),
    .start (mul_start),
    .prec  (control),
    .lanes (lanes),
    .k1    (k1),
    .k11   (k11),
    .k2    (k2),
    .k22   (k22),
    .k3    (k3),
    .k33   (k33),
    .p     (product),
    .done  (mul_done_op)
  );

  pulse_sync u_done_sync (
    .src_clk   (op_clk),
    .src_rst_n (rst_n),
    .src_pulse (mul_done_op),
    .dst_clk   (clk),
    .dst_rst_n (rst_n),
    .dst_pulse (mul_done)
  );

  led_counter u_led (
    .clk   (op_clk),
    .rst_n (rst_n),
    .count (led_o)
  );

  assign product_o    = product;
  assign control_o    = control;
  assign voltage_mv_o = target_mv;
  assign supply_mv_o  = supply_mv;
  assign op_clk_o     = op_clk;
  assign clk_div2_o   = clk_div2;
  assign clk_div4_o   = clk_div4;

endmodule
