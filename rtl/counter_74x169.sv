// counter_74x169 -- 4-bit synchronous up/down counter cell modelled on the
// 74LS169, the discrete part the source design builds its 16-bit counter
// from.
//
// Four J-K flip-flops, one per bit, as in the gate-level model of the part.
// Each flip-flop's J and K are an OR of a load term and a count term:
//   load (load_n low):  J = d[i],      K = !d[i]          (set or clear)
//   count:              J = K = toggle[i]                  (toggle or hold)
// where bit 0 toggles on every count and bit i toggles when every lower bit
// is 1 (counting up) or 0 (counting down). The flip-flops are clocked by a
// counting-clock strobe cnt_clk_en; counting needs p_n and t_n both low.
// Loading has priority and takes d on the next system clock edge even
// without a strobe. rco_n, the active-low ripple carry, is the NOR of two
// AND terms: t_n low, counting up, all bits 1; or t_n low, counting down,
// all bits 0, as in the part's gate model. Cascading feeds rco_n into the
// next cell's t_n. Timing: one system clock per update; rco_n is
// combinational.
// The system-clock/strobe form of the counting clock and the asynchronous
// reset are this design's own choices; the real part loads only on a
// counting-clock edge, whereas the source design's functional counter
// (followed here) loads at once.
module counter_74x169 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cnt_clk_en,
  input  logic       u_d,
  input  logic       p_n,
  input  logic       t_n,
  input  logic       load_n,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       rco_n
);

  logic       count, load, ff_en;
  logic [3:0] toggle;

  assign load  = !load_n;
  assign count = cnt_clk_en && !p_n && !t_n && !load;
  assign ff_en = load || count;

  assign toggle[0] = 1'b1;
  for (genvar i = 1; i < 4; i++) begin : g_toggle
    assign toggle[i] = toggle[i-1] && (u_d ? q[i-1] : !q[i-1]);
  end

  for (genvar i = 0; i < 4; i++) begin : g_bit
    logic j, k;
    assign j = (load && d[i])  || (count && toggle[i]);
    assign k = (load && !d[i]) || (count && toggle[i]);
    jk_ff u_ff (
      .clk, .rst_n, .en(ff_en), .j, .k, .q(q[i]), .q_n()
    );
  end

  logic term_up, term_down;
  assign term_up   = !t_n &&  u_d && (q == 4'hF);
  assign term_down = !t_n && !u_d && (q == 4'h0);
  assign rco_n     = !(term_up || term_down);

endmodule
