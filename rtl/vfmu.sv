// vfmu: voltage and frequency management unit.
//
// Turns the control code from the operand scanner into the operating point
// of the multiplier: a target supply voltage for the voltage scaling unit and
// a target clock (as a precision class, which the frequency scaling unit
// decodes into F/4, F/2 or F). It also reports the target frequency in MHz
// for display.
//
//   control 1 (8-bit)  -> 1.2 V, F/4 = 25 MHz
//   control 2 (16-bit) -> 2.5 V, F/2 = 50 MHz
//   control 3 (32-bit) -> 3.3 V, F   = 100 MHz
//
// err is the error feedback from the multiplier to this unit. While it is
// high the unit asks for the full operating point (3.3 V, F) whatever the
// control code; that reaction, like the treatment of code 0 as full
// precision, is this design's own choice. The mapping table is the published
// one.
//
// Timing: purely combinational.
module vfmu
  import dvfs_pkg::*;
(
  input  prec_e                 control,     // from the operand scanner
  input  logic                  err,         // error feedback from the multiplier
  output prec_e                 target_prec, // clock target for the frequency scaling unit
  output logic [MV_WIDTH-1:0]   target_mv,   // voltage reference for the voltage scaling unit
  output logic [MHZ_WIDTH-1:0]  target_mhz   // target operating frequency, MHz
);

  always_comb begin
    if (err || control == PREC_NONE) target_prec = PREC_32;
    else                             target_prec = control;
    target_mv  = prec_to_mv(target_prec);
    target_mhz = prec_to_mhz(target_prec);
  end

endmodule
