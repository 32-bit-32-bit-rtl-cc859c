// mult8x8: unsigned 8x8 -> 16-bit multiplier, the building block of the
// 32x32 multi-precision multiplier.
//
// Purely combinational. The internal structure of the block is left to
// synthesis (on an FPGA it maps to a DSP slice or LUT array); the published
// design only names the 8x8 multiplier as its basic cell.
module mult8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  assign p = a * b;

endmodule
