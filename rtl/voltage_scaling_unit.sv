// voltage_scaling_unit: behavioural model of the supply regulator.
//
// This is a behavioural model, not logic to be built: the real voltage
// scaling unit is an analog regulator that sets the multiplier's supply to
// the reference voltage the VFMU asks for (1.2 V, 2.5 V or 3.3 V). The model
// represents the supply as an integer number of millivolts that slews toward
// the reference by at most STEP_MV per clock, and raises v_ok while the
// supply equals the reference, so that the rest of the system can wait for
// the new voltage before it uses the new clock.
//
// Timing: one step per rising edge of clk. After reset the supply is at
// RESET_MV (3.3 V, the full operating point). Going from 1.2 V to 3.3 V takes
// 21 clocks with the default step. The slew rate and the reset value are this
// model's own choices; the published design gives only the target voltages.
module voltage_scaling_unit
  import dvfs_pkg::*;
#(
  parameter logic [MV_WIDTH-1:0] STEP_MV  = 12'd100,  // slew per clock, mV
  parameter logic [MV_WIDTH-1:0] RESET_MV = MV_32      // supply after reset, mV
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MV_WIDTH-1:0] target_mv,  // voltage reference from the VFMU
  output logic [MV_WIDTH-1:0] supply_mv,  // modelled supply voltage
  output logic                v_ok        // supply has reached the reference
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      supply_mv <= RESET_MV;
    end else if (supply_mv < target_mv) begin
      supply_mv <= (target_mv - supply_mv > STEP_MV) ? supply_mv + STEP_MV : target_mv;
    end else if (supply_mv > target_mv) begin
      supply_mv <= (supply_mv - target_mv > STEP_MV) ? supply_mv - STEP_MV : target_mv;
    end
  end

  assign v_ok = (supply_mv == target_mv);

endmodule
