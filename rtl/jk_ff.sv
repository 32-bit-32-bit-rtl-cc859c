// jk_ff: JK flip-flop with asynchronous active-low clear.
//
// On each rising edge of clk: J=0,K=0 holds, J=1,K=0 sets, J=0,K=1 clears,
// J=1,K=1 toggles. With J and K tied high it divides its clock by two, which
// is how the frequency scaling unit uses it. q_n is the complement of q.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= (j & ~q) | (~k & q);
  end

  assign q_n = ~q;

endmodule
