// pulse_sync: carries a single-cycle pulse from one clock domain to another.
//
// A pulse on src_pulse flips a toggle register in the source domain. In the
// destination domain the toggle passes through two synchronising flip-flops,
// and a change seen at the output of the second one gives a one-cycle pulse
// on dst_pulse, two to three destination cycles later. Source pulses must be
// further apart than that transfer time; the sequencer guarantees this by
// having at most one operation in flight. Used between the main clock and the
// scaled operating clock, whose ratio changes at run time.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic src_tgl;
  logic [2:0] dst_sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     src_tgl <= 1'b0;
    else if (src_pulse) src_tgl <= ~src_tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) dst_sync <= '0;
    else            dst_sync <= {dst_sync[1:0], src_tgl};
  end

  assign dst_pulse = dst_sync[2] ^ dst_sync[1];

endmodule
