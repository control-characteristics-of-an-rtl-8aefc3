// adpid_counter -- one counter of the ADPID compensator, built either as the
// behavioural N-bit counter (updown_counter) or as the cascade of four 4-bit
// 74x169 cells (counter16_cascade).
//
// Both have the same interface and cycle behaviour: load has priority and
// acts on the next system clock, counting happens on counting-clock strobes
// while both active-low enables are low, and cout_n is the combinational
// active-low terminal-count carry. The source design used the behavioural
// counter in its simulations for speed, which is also the default here
// (IMPL = CNT_FUNCTIONAL). The cascade exists only at N = 16; for any other
// width the behavioural counter is used whatever IMPL says.
module adpid_counter
  import adpid_pkg::*;
#(
  parameter int unsigned   N    = CNT_W_DEFAULT,
  parameter counter_impl_e IMPL = CNT_FUNCTIONAL
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

  if (IMPL == CNT_CASCADE && N == 16) begin : g_cascade
    counter16_cascade u_cnt (
      .clk, .rst_n, .cnt_clk_en, .u_d, .en_p_n, .en_t_n, .load_n,
      .din, .q, .cout_n
    );
  end else begin : g_functional
    updown_counter #(.N(N)) u_cnt (
      .clk, .rst_n, .cnt_clk_en, .u_d, .en_p_n, .en_t_n, .load_n,
      .din, .q, .cout_n
    );
  end

endmodule
