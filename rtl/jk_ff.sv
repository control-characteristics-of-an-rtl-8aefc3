// jk_ff -- positive-edge J-K flip-flop, the storage element of the 4-bit
// 74x169 counter cell.
//
// On an enabled clock edge: J=0 K=0 holds, J=1 K=0 sets, J=0 K=1 clears and
// J=1 K=1 toggles. q_n is always the complement of q. The edge is the rising
// edge of clk qualified by the one-cycle strobe en, so a flip-flop clocked by
// a slower counting clock lives in the single system-clock domain. The
// J-K behaviour and the Q / !Q outputs are those of the gate-level counter
// model this design follows; the clock-enable form and the asynchronous
// active-low reset to 0 are this design's own choices.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= (j && !q) || (!k && q);
  end

  assign q_n = !q;

endmodule
