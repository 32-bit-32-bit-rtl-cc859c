// mp_multiplier: 32x32-bit multi-precision multiplier built from 8x8 blocks.
//
// The unsigned 32-bit operands are split into bytes a[i] and b[j]
// (i, j = 0..3) and sixteen 8x8 multipliers form the partial products
// a[i]*b[j], which are added with weight 2^(8*(i+j)) into the 64-bit result.
// The precision code from the operand scanner decides how much of the array
// takes part:
//   8-bit  (1): only block (0,0) gets operands (k1, k11)        -> 16-bit result
//   16-bit (2): blocks i,j in 0..1 get operands (k2, k22)       -> 32-bit result
//   32-bit (3): all sixteen blocks get operands (k3, k33)       -> 64-bit result
// The same array also works as independent smaller multipliers on packed
// operands taken from k3/k33 (lanes input):
//   LANES_4X8 : only the diagonal blocks (i,i) are active, so p[16i+:16] =
//               a[i]*b[i] -- four independent 8x8 products;
//   LANES_2X16: blocks with i/2 == j/2 are active, so p[31:0] and p[63:32]
//               are the products of the low and high 16-bit halves.
// The weighted sum needs no change for this: the active blocks' products
// fall into disjoint bit fields.
// Blocks outside the selected section have their inputs forced to zero
// (operand isolation), so they do not switch; this is how the unused section
// of the multiplier is disabled. Code 0 is treated as 32-bit.
//
// Timing: the product is registered. On a rising edge of clk (the scaled
// operating clock) with start high the product of the scheduled operands is
// stored in p and done is high for the following cycle, i.e. a latency of one
// operating-clock cycle. p holds until the next start. Reset is asynchronous,
// active low.
//
// From the published design: 32x32 operation from 8x8 building blocks, the
// three precisions and disabling the unused section. Own choices: the
// partial-product grid and adder, operand isolation by forcing zeros, the
// one-cycle registered interface and the packed-lane format. The published
// design states that the array can work as independent smaller multipliers
// but gives no operand format for it.
module mp_multiplier
  import dvfs_pkg::*;
(
  input  logic        clk,     // operating clock from the frequency scaling unit
  input  logic        rst_n,
  input  logic        start,   // multiply the scheduled operands this cycle
  input  prec_e       prec,    // control code from the operand scanner
  input  lanes_e      lanes,   // one operand pair or packed independent lanes
  input  logic [7:0]  k1,      // 8-bit operand pair
  input  logic [7:0]  k11,
  input  logic [15:0] k2,      // 16-bit operand pair
  input  logic [15:0] k22,
  input  logic [31:0] k3,      // 32-bit operand pair
  input  logic [31:0] k33,
  output logic [63:0] p,       // product
  output logic        done     // p valid, one cycle after start
);

  logic [31:0] a, b;
  logic [7:0]  a_byte [4][4];
  logic [7:0]  b_byte [4][4];
  logic [15:0] pp     [4][4];
  logic [63:0] sum;

  // Select the scheduled operand pair.
  always_comb begin
    if (lanes == LANES_4X8 || lanes == LANES_2X16) begin
      a = k3; b = k33;
    end else begin
      case (prec)
        PREC_8:  begin a = {24'b0, k1}; b = {24'b0, k11}; end
        PREC_16: begin a = {16'b0, k2}; b = {16'b0, k22}; end
        default: begin a = k3;          b = k33;          end
      endcase
    end
  end

  // Operand isolation: a block outside the active section sees zeros.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        logic active;
        if (lanes == LANES_4X8)       active = (i == j);
        else if (lanes == LANES_2X16) active = (i / 2) == (j / 2);
        else begin
          case (prec)
            PREC_8:  active = (i == 0) && (j == 0);
            PREC_16: active = (i < 2) && (j < 2);
            default: active = 1'b1;
          endcase
        end
        a_byte[i][j] = active ? a[8*i +: 8] : 8'b0;
        b_byte[i][j] = active ? b[8*j +: 8] : 8'b0;
      end
    end
  end

  for (genvar gi = 0; gi < 4; gi++) begin : g_row
    for (genvar gj = 0; gj < 4; gj++) begin : g_col
      mult8x8 u_mul (.a(a_byte[gi][gj]), .b(b_byte[gi][gj]), .p(pp[gi][gj]));
    end
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        sum += {48'b0, pp[i][j]} << (8 * (i + j));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) p <= sum;
    end
  end

endmodule
