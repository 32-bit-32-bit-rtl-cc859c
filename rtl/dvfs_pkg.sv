// dvfs_pkg: types and constants shared by the multi-precision DVFS multiplier.
//
// The operand scanner classifies every operand pair into one of three
// precision classes. The class code is the "control signal" the rest of the
// system works from: 1 = 8-bit, 2 = 16-bit, 3 = 32-bit. Code 0 is unused and
// is treated as 32-bit wherever a value has to be chosen, because full
// voltage and full clock are always safe.
//
// The thresholds (128, 32768, 2147483648), the supply voltages
// (1.2 V, 2.5 V, 3.3 V) and the clock ratios (F/4, F/2, F with F = 100 MHz)
// are the design's published operating points. Voltages are carried as
// integer millivolts and frequencies as integer MHz; those encodings are
// choices of this implementation.
package dvfs_pkg;

  typedef enum logic [1:0] {
    PREC_NONE = 2'd0,
    PREC_8    = 2'd1,
    PREC_16   = 2'd2,
    PREC_32   = 2'd3
  } prec_e;

  // Operand layout. LANES_1: one 32-bit operand pair, classified by
  // magnitude. LANES_2X16 / LANES_4X8: each 32-bit word packs two 16-bit or
  // four 8-bit operands and the array works as that many independent
  // multipliers (parallel processing). Code 3 is treated as LANES_1.
  typedef enum logic [1:0] {
    LANES_1    = 2'd0,
    LANES_2X16 = 2'd1,
    LANES_4X8  = 2'd2
  } lanes_e;

  // Largest operand value that still belongs to each class (inclusive).
  localparam logic [31:0] THRESH_8  = 32'd128;
  localparam logic [31:0] THRESH_16 = 32'd32768;

  // Target supply voltage per class, in millivolts.
  localparam int unsigned MV_WIDTH = 12;
  localparam logic [MV_WIDTH-1:0] MV_8  = 12'd1200;
  localparam logic [MV_WIDTH-1:0] MV_16 = 12'd2500;
  localparam logic [MV_WIDTH-1:0] MV_32 = 12'd3300;

  // Main clock frequency and operating frequency per class, in MHz.
  localparam int unsigned MHZ_WIDTH = 8;
  localparam logic [MHZ_WIDTH-1:0] F_MAIN_MHZ = 8'd100;

  function automatic logic [MV_WIDTH-1:0] prec_to_mv(prec_e p);
    case (p)
      PREC_8:  return MV_8;
      PREC_16: return MV_16;
      default: return MV_32;
    endcase
  endfunction

  // Operating frequency: F/4 for 8-bit, F/2 for 16-bit, F for 32-bit.
  function automatic logic [MHZ_WIDTH-1:0] prec_to_mhz(prec_e p);
    case (p)
      PREC_8:  return F_MAIN_MHZ >> 2;
      PREC_16: return F_MAIN_MHZ >> 1;
      default: return F_MAIN_MHZ;
    endcase
  endfunction

endpackage
