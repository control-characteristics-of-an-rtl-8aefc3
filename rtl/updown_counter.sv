// updown_counter -- N-bit synchronous binary up/down counter, the building
// block of every stage of the ADPID compensator.
//
// Behaviour (the 74x169-style interface of the source design):
//   * load_n low: q takes din on the next system clock edge. Load has
//     priority over counting and does not wait for a counting-clock edge,
//     so a counter whose counting clock is tied off still works as a
//     register (the ADPID uses two counters that way, as latches).
//   * otherwise, when the counting-clock strobe cnt_clk_en is high and both
//     active-low enables en_p_n and en_t_n are low, q counts one step up
//     (u_d = 1) or down (u_d = 0), wrapping modulo 2**N.
//   * cout_n is the active-low ripple carry: low while en_t_n is low and q is
//     at its terminal count (all ones counting up, zero counting down), so
//     the next enabled count wraps. It is combinational, as on the 74x169,
//     and lets stages be cascaded by feeding it into the next en_t_n.
// Timing: one system clock from a qualifying strobe or load to the new q.
// The source design's counting clock is a real clock of frequency f_N; here
// it is the one-cycle strobe cnt_clk_en in the system clock domain. The
// asynchronous reset to zero is this design's own addition.
module updown_counter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cnt_clk_en,
  input  logic         u_d,
  input  logic         en_p_n,
  input  logic         en_t_n,
  input  logic         load_n,
  input  logic [N-1:0] din,
  output logic [N-1:0] q,
  output logic         cout_n
);

  logic count_en;
  assign count_en = cnt_clk_en && !en_p_n && !en_t_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (!load_n)  q <= din;
    else if (count_en) q <= u_d ? q + 1'b1 : q - 1'b1;
  end

  assign cout_n = !(!en_t_n && (u_d ? (&q) : !(|q)));

endmodule
