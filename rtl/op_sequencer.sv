// op_sequencer: runs one multiplication through scan, scaling and multiply.
//
// The published flow is: the operands are scanned, the VFMU sends the target
// voltage and frequency to the scaling units, and the multiplier then works at
// that voltage and clock. This controller, in the main clock domain, enforces
// that order:
//   IDLE  : ready is high. A start pulse loads the operand scanner.
//   SCALE : waits until the supply has reached the target voltage (v_ok) and
//           the operating clock runs at the target frequency (clk_ok), then
//           sends a request pulse to the multiplier.
//   MULT  : waits for the multiplier's completion pulse, brought back into
//           the main clock domain, then pulses done and returns to IDLE.
// Counters report how many cycles the last operation spent waiting for the
// operating point (scale_cycles), which makes voltage/clock changes visible.
//
// Timing: start is sampled only in IDLE. load and mul_req are one-cycle
// pulses; done is a one-cycle pulse in the cycle after mul_done arrives.
// The state machine and its handshake are this design's own; the published
// design gives only the order of the steps.
module op_sequencer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,        // begin an operation (ignored unless ready)
  input  logic       v_ok,         // supply at target voltage
  input  logic       clk_ok,       // operating clock at target frequency
  input  logic       mul_done,     // multiplier finished (main clock domain)
  output logic       ready,        // idle, accepts start
  output logic       load,         // capture operands into the scanner
  output logic       mul_req,      // start the multiplier
  output logic       done,         // result valid
  output logic [7:0] scale_cycles  // cycles spent in SCALE by the last operation
);

  typedef enum logic [1:0] {S_IDLE, S_SCALE, S_MULT} state_e;
  state_e state;

  assign ready   = (state == S_IDLE);
  assign load    = (state == S_IDLE) && start;
  assign mul_req = (state == S_SCALE) && v_ok && clk_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      done         <= 1'b0;
      scale_cycles <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state        <= S_SCALE;
          scale_cycles <= '0;
        end
        S_SCALE: begin
          if (mul_req) state <= S_MULT;
          else if (scale_cycles != '1) scale_cycles <= scale_cycles + 8'd1;
        end
        S_MULT: if (mul_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The multiplier may only report completion for a request it was given.
  a_done_in_mult: assert property (@(posedge clk) disable iff (!rst_n)
                                   mul_done |-> state == S_MULT);

endmodule
