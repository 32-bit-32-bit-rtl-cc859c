// led_counter: 4-bit free-running counter on the operating clock.
//
// Counts rising edges of the scaled operating clock and drives four LEDs, so
// that the blink rate makes the current operating frequency visible on a
// board: at 25 MHz the LEDs change four times slower than at 100 MHz. In
// practice the LEDs would sit on upper bits of a longer prescaler; the
// published design specifies a 4-bit counter and that is what is built.
//
// Timing: count increments by one (modulo 16) on every rising edge of clk.
// Asynchronous active-low reset to zero.
module led_counter (
  input  logic       clk,   // operating clock
  input  logic       rst_n,
  output logic [3:0] count  // LED outputs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= 4'd0;
    else        count <= count + 4'd1;
  end

endmodule
