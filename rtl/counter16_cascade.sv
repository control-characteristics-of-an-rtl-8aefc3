// counter16_cascade -- 16-bit synchronous up/down counter made of four
// cascaded 4-bit counter_74x169 cells, the gate-level alternative the source
// design gives for its 16-bit counter.
//
// All cells share the counting-clock strobe, direction, load and en_p_n. The
// lowest cell's t_n is en_t_n; each higher cell's t_n is the ripple carry of
// the cell below, so a cell only counts when all lower cells are at their
// terminal count. cout_n is the top cell's carry: low when the whole counter
// is at 16'hFFFF counting up or 16'h0000 counting down while en_t_n is low.
// The interface and timing are those of updown_counter with N = 16, and the
// two are interchangeable (adpid_counter selects between them).
module counter16_cascade (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cnt_clk_en,
  input  logic        u_d,
  input  logic        en_p_n,
  input  logic        en_t_n,
  input  logic        load_n,
  input  logic [15:0] din,
  output logic [15:0] q,
  output logic        cout_n
);

  logic [4:0] carry_n;   // carry_n[k] is the t_n of cell k
  assign carry_n[0] = en_t_n;

  for (genvar k = 0; k < 4; k++) begin : g_cell
    counter_74x169 u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .cnt_clk_en (cnt_clk_en),
      .u_d        (u_d),
      .p_n        (en_p_n),
      .t_n        (carry_n[k]),
      .load_n     (load_n),
      .d          (din[4*k +: 4]),
      .q          (q[4*k +: 4]),
      .rco_n      (carry_n[k+1])
    );
  end

  assign cout_n = carry_n[4];

endmodule
