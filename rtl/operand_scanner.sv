// operand_scanner: input operands scheduler (IOS).
//
// Classifies an operand pair by magnitude and schedules it into operand
// registers of the matching width. Each operand is compared with two
// thresholds: a value up to 128 is 8-bit data, up to 32768 is 16-bit data,
// anything larger is 32-bit data. When the two operands fall in different
// classes the larger class wins, so a 16x8 or 8x32 pair runs at 16 or 32 bits.
// The resulting control code (1, 2, 3) goes to the voltage and frequency
// management unit.
//
// The scheduled operands appear in three register pairs: k1/k11 (8 bits),
// k2/k22 (16 bits) and k3/k33 (32 bits). Only the pair of the selected class
// is loaded; the other two are cleared, so the unused sections of the
// multiplier see constant zero inputs and do not toggle.
//
// Parallel (packed) operation: with lanes = LANES_2X16 or LANES_4X8 each
// 32-bit word carries two 16-bit or four 8-bit operands, to be multiplied
// lane by lane. The words are then loaded unchanged into k3/k33 (the other
// pairs are cleared) and the class is the larger of the lane width's class
// and the class of the largest lane value, with the same thresholds: a 4x8
// word whose bytes are all at most 128 runs as class 1, one with a byte of
// 129..255 as class 2; 2x16 words run as class 2 or 3.
//
// Timing: one clock. On a rising clk edge with load high, the operands are
// classified and all outputs update together; otherwise they hold. Reset
// (active low, asynchronous) clears every register and sets control to 0.
//
// From the published design: the thresholds, the "highest class wins" rule,
// the codes 1/2/3 and the register names and widths. Own choices: operands
// are unsigned, the comparison is inclusive (as the published steps word it,
// "lower than or equal to"), the register capture on load, clearing the
// unselected pairs, and the packed-lane layout (the published design states
// that the array can work as independent smaller multipliers but gives no
// operand format for it).
module operand_scanner
  import dvfs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,     // capture m1/m2 this cycle
  input  lanes_e      lanes,    // operand layout: one pair or packed lanes
  input  logic [31:0] m1,       // multiplicand
  input  logic [31:0] m2,       // multiplier
  output prec_e       control,  // 1 = 8-bit, 2 = 16-bit, 3 = 32-bit
  output lanes_e      lanes_q,  // layout of the captured operands
  output logic [7:0]  k1,
  output logic [7:0]  k11,
  output logic [15:0] k2,
  output logic [15:0] k22,
  output logic [31:0] k3,
  output logic [31:0] k33
);

  function automatic prec_e classify(logic [31:0] v);
    if (v <= THRESH_8)       return PREC_8;
    else if (v <= THRESH_16) return PREC_16;
    else                     return PREC_32;
  endfunction

  function automatic prec_e max_prec(prec_e x, prec_e y);
    return (x > y) ? x : y;
  endfunction

  lanes_e lanes_n;
  prec_e  c_next;

  always_comb begin
    lanes_n = (lanes == LANES_2X16 || lanes == LANES_4X8) ? lanes : LANES_1;
    case (lanes_n)
      LANES_4X8: begin
        c_next = PREC_8;
        for (int i = 0; i < 4; i++) begin
          c_next = max_prec(c_next, classify({24'b0, m1[8*i +: 8]}));
          c_next = max_prec(c_next, classify({24'b0, m2[8*i +: 8]}));
        end
      end
      LANES_2X16: begin
        c_next = PREC_16;
        for (int i = 0; i < 2; i++) begin
          c_next = max_prec(c_next, classify({16'b0, m1[16*i +: 16]}));
          c_next = max_prec(c_next, classify({16'b0, m2[16*i +: 16]}));
        end
      end
      default: c_next = max_prec(classify(m1), classify(m2));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      control <= PREC_NONE;
      lanes_q <= LANES_1;
      k1  <= '0;
      k11 <= '0;
      k2  <= '0;
      k22 <= '0;
      k3  <= '0;
      k33 <= '0;
    end else if (load) begin
      control <= c_next;
      lanes_q <= lanes_n;
      if (lanes_n == LANES_1) begin
        k1  <= (c_next == PREC_8)  ? m1[7:0]  : '0;
        k11 <= (c_next == PREC_8)  ? m2[7:0]  : '0;
        k2  <= (c_next == PREC_16) ? m1[15:0] : '0;
        k22 <= (c_next == PREC_16) ? m2[15:0] : '0;
        k3  <= (c_next == PREC_32) ? m1       : '0;
        k33 <= (c_next == PREC_32) ? m2       : '0;
      end else begin
        k1  <= '0;
        k11 <= '0;
        k2  <= '0;
        k22 <= '0;
        k3  <= m1;
        k33 <= m2;
      end
    end
  end

endmodule
