// freq_scaling_unit: JK flip-flop clock divider and operating-clock select.
//
// Two JK flip-flops with J = K = 1 form a ripple divider: the first is clocked
// by the main clock F and gives clk_div2 = F/2, the second is clocked by the
// first one's output and gives clk_div4 = F/4. The operating clock of the
// multiplier is then F/4 for 8-bit data, F/2 for 16-bit data and F for
// 32-bit data, as the VFMU asks.
//
// The select is not applied the moment the target changes. It is updated on
// a falling edge of clk at which both divided clocks are low; F, F/2 and F/4
// are then all low until the next rising edge of clk, so switching the
// multiplexer there cannot produce a runt pulse. The applied select is an
// output (applied_prec) so that the sequencer can wait until the new clock
// is in force. A switch therefore takes effect within four clk periods.
//
// From the published design: the two-JK-flip-flop ripple divider, the ratios
// and their mapping to the precision classes. Own choices: the glitch-free
// switch point, asynchronous active-low reset of the divider (all clocks
// start low), and selecting F after reset.
module freq_scaling_unit
  import dvfs_pkg::*;
(
  input  logic  clk,          // main clock F
  input  logic  rst_n,
  input  prec_e target_prec,  // from the VFMU
  output logic  clk_div2,     // F/2 (first JK flip-flop, Q0)
  output logic  clk_div4,     // F/4 (second JK flip-flop, Q1)
  output prec_e applied_prec, // select currently driving op_clk
  output logic  op_clk        // operating clock for the multiplier
);

  logic q0_n, q1_n;

  jk_ff u_jk0 (.clk(clk),      .rst_n(rst_n), .j(1'b1), .k(1'b1), .q(clk_div2), .q_n(q0_n));
  jk_ff u_jk1 (.clk(clk_div2), .rst_n(rst_n), .j(1'b1), .k(1'b1), .q(clk_div4), .q_n(q1_n));

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)                    applied_prec <= PREC_32;
    else if (q0_n && q1_n)         applied_prec <= (target_prec == PREC_NONE) ? PREC_32 : target_prec;
  end

  always_comb begin
    case (applied_prec)
      PREC_8:  op_clk = clk_div4;
      PREC_16: op_clk = clk_div2;
      default: op_clk = clk;
    endcase
  end

endmodule
