// adpid_core -- the all-digital PID compensator (revised form with
// history-based error formation and latched derivative and accumulator).
//
// Idea: a reference pulse train (the desired encoder output) and the plant's
// encoder pulse train are compared edge by edge. While they disagree, three
// up/down counters run in parallel at their own counting clocks, counting up
// when the reference is ahead and down when the feedback is ahead:
//   P  is cleared when an error interval begins, so at its end it holds the
//      signed width of that interval, scaled by f_P;
//   I  is never cleared, so it holds the running sum of all error widths,
//      scaled by f_I;
//   D  is cleared like P but counts at f_D; a second register (D latch)
//      keeps the value D had at the end of the previous interval, and the
//      difference D - D_latch is the change in error width.
// When an error interval ends, the A latch captures the saturated sum
// P + I + (D - D_latch) and the D latch captures D. When the next error
// interval begins, the accumulator counter A is loaded from the A latch and
// counts down towards zero at f_A; the PWM output is high while A is above
// zero. The output pulse therefore starts with each error interval and lasts
// (P + I + dD) / f_A seconds, which makes K_N = f_N / f_A the gains.
//
// Interface: ref_i/fdbk_i synchronous to clk; tick_p/i/d/a are the counting
// clock strobes, tick_s samples the two edge detectors. pwm_out is the
// control output, cnt_out the accumulator count (both as in the source
// design). The remaining outputs expose internal state for observation.
// Timing: the error code is combinational from the inputs; counters update
// one clock after a strobe; begin/end pulses appear one clock after the
// first tick_s that sees the change and last one tick_s period; pwm_out is
// registered (one clock after A changes).
// Follows the source design: the error table, the wiring of every counter's
// U_D, EN_P, EN_T, _LOAD and INDATA, the two edge detectors on EMag and its
// inverse, the subtract-and-add of the derivative, and PWM = (A > 0).
// Own choices: signed two's complement counts of CNT_W bits (the source
// simulated unbounded integers); the sum saturates to CNT_W bits before the
// A latch; A stops counting at zero instead of running negative (same
// output); the two latches load only in the first clock of the end pulse so
// the A latch sees the previous D latch value; the registered PWM output.
module adpid_core
  import adpid_pkg::*;
#(
  parameter int unsigned   CNT_W = CNT_W_DEFAULT,
  parameter counter_impl_e IMPL  = CNT_FUNCTIONAL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_i,
  input  logic                    fdbk_i,
  input  logic                    tick_p,
  input  logic                    tick_i,
  input  logic                    tick_d,
  input  logic                    tick_a,
  input  logic                    tick_s,
  output logic                    pwm_out,
  output logic signed [CNT_W-1:0] cnt_out,
  output logic                    esgn,
  output logic                    emag_n,
  output logic                    err_begin,
  output logic                    err_end,
  output logic signed [CNT_W-1:0] p_cnt,
  output logic signed [CNT_W-1:0] i_cnt,
  output logic signed [CNT_W-1:0] d_cnt,
  output logic signed [CNT_W-1:0] d_latch,
  output logic signed [CNT_W-1:0] a_latch,
  output logic [3:0]              cout_n    // {A, D, I, P} active-low carries
);

  localparam logic signed [CNT_W+1:0] SUM_MAX = (CNT_W+2)'(2**(CNT_W-1) - 1);
  localparam logic signed [CNT_W+1:0] SUM_MIN = -(CNT_W+2)'(2**(CNT_W-1));

  // ---- error formation -------------------------------------------------
  sig_err u_err (
    .clk, .rst_n, .ref_i, .fdbk_i, .esgn, .emag_n
  );

  // err_end: EMag (active low) rises, i.e. the error interval is over.
  pedge_det u_end_det (
    .clk, .rst_n, .clk_en(tick_s), .sig(emag_n), .clr_n(1'b1),
    .edge_out(err_end)
  );

  // err_begin: the inverted EMag rises, i.e. an error interval starts.
  pedge_det u_begin_det (
    .clk, .rst_n, .clk_en(tick_s), .sig(!emag_n), .clr_n(1'b1),
    .edge_out(err_begin)
  );

  logic err_end_q, latch_ld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_end_q <= 1'b0;
    else        err_end_q <= err_end;
  end
  assign latch_ld = err_end && !err_end_q;

  // ---- P, I and D stages -------------------------------------------------
  adpid_counter #(.N(CNT_W), .IMPL(IMPL)) u_cnt_p (
    .clk, .rst_n, .cnt_clk_en(tick_p), .u_d(esgn), .en_p_n(1'b0),
    .en_t_n(emag_n), .load_n(!err_begin), .din('0),
    .q(p_cnt), .cout_n(cout_n[0])
  );

  adpid_counter #(.N(CNT_W), .IMPL(IMPL)) u_cnt_i (
    .clk, .rst_n, .cnt_clk_en(tick_i), .u_d(esgn), .en_p_n(1'b0),
    .en_t_n(emag_n), .load_n(1'b1), .din('0),
    .q(i_cnt), .cout_n(cout_n[1])
  );

  adpid_counter #(.N(CNT_W), .IMPL(IMPL)) u_cnt_d (
    .clk, .rst_n, .cnt_clk_en(tick_d), .u_d(esgn), .en_p_n(1'b0),
    .en_t_n(emag_n), .load_n(!err_begin), .din('0),
    .q(d_cnt), .cout_n(cout_n[2])
  );

  // D latch: a counter with its counting disabled, used as a register.
  adpid_counter #(.N(CNT_W), .IMPL(CNT_FUNCTIONAL)) u_latch_d (
    .clk, .rst_n, .cnt_clk_en(1'b0), .u_d(1'b1), .en_p_n(1'b1),
    .en_t_n(1'b1), .load_n(!latch_ld), .din(d_cnt),
    .q(d_latch), .cout_n()
  );

  // ---- combination -------------------------------------------------------
  logic signed [CNT_W+1:0] sum_full;
  logic signed [CNT_W-1:0] sum_sat;

  assign sum_full = (CNT_W+2)'(p_cnt) + (CNT_W+2)'(i_cnt)
                  + (CNT_W+2)'(d_cnt) - (CNT_W+2)'(d_latch);

  always_comb begin
    if (sum_full > SUM_MAX)      sum_sat = SUM_MAX[CNT_W-1:0];
    else if (sum_full < SUM_MIN) sum_sat = SUM_MIN[CNT_W-1:0];
    else                         sum_sat = sum_full[CNT_W-1:0];
  end

  adpid_counter #(.N(CNT_W), .IMPL(CNT_FUNCTIONAL)) u_latch_a (
    .clk, .rst_n, .cnt_clk_en(1'b0), .u_d(1'b1), .en_p_n(1'b1),
    .en_t_n(1'b1), .load_n(!latch_ld), .din(sum_sat),
    .q(a_latch), .cout_n()
  );

  // ---- accumulator: count the combined error down to zero at f_A ----------
  logic a_positive;
  assign a_positive = (cnt_out > 0);

  adpid_counter #(.N(CNT_W), .IMPL(CNT_FUNCTIONAL)) u_cnt_a (
    .clk, .rst_n, .cnt_clk_en(tick_a), .u_d(1'b0), .en_p_n(1'b0),
    .en_t_n(!a_positive), .load_n(!err_begin), .din(a_latch),
    .q(cnt_out), .cout_n(cout_n[3])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm_out <= 1'b0;
    else        pwm_out <= a_positive;
  end

endmodule
