// adpid_top -- complete all-digital PID controller: reference and encoder
// pulse trains in, PWM drive out.
//
// The controller sits where a classical loop would have an encoder decoder,
// an ADC-style error computation, a PID law and a PWM modulator; here all of
// that is counters and gates. ref_in is the desired encoder waveform (a
// square wave at the target pulse rate), fdbk_in one channel of the plant's
// incremental encoder. Both are asynchronous and pass through two-flop
// synchronisers (this design's addition). Five rate generators make the
// counting clocks from clk: inc_p, inc_i, inc_d and inc_a set f_P, f_I, f_D
// and f_A (the tuning, gain K_N = f_N / f_A), inc_s the edge detectors'
// sampling clock. Use adpid_pkg::freq_to_inc to compute them; an increment
// of zero switches that term off (e.g. inc_d = 0 gives a PI controller).
// pwm_out drives the plant; cnt_out is the accumulator count. err_sgn and
// err_mag_n show the counting direction and enable.
// Timing: inputs reach the error logic three clocks after they change (two
// synchroniser flops, then the sample register); everything else as in
// adpid_core.
module adpid_top
  import adpid_pkg::*;
#(
  parameter int unsigned   CNT_W = CNT_W_DEFAULT,
  parameter counter_impl_e IMPL  = CNT_FUNCTIONAL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_in,
  input  logic                    fdbk_in,
  input  logic [PHASE_W-1:0]      inc_p,
  input  logic [PHASE_W-1:0]      inc_i,
  input  logic [PHASE_W-1:0]      inc_d,
  input  logic [PHASE_W-1:0]      inc_a,
  input  logic [PHASE_W-1:0]      inc_s,
  output logic                    pwm_out,
  output logic signed [CNT_W-1:0] cnt_out,
  output logic                    err_sgn,
  output logic                    err_mag_n
);

  // ---- input synchronisers -------------------------------------------------
  logic [1:0] ref_sync, fdbk_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync  <= '0;
      fdbk_sync <= '0;
    end else begin
      ref_sync  <= {ref_sync[0], ref_in};
      fdbk_sync <= {fdbk_sync[0], fdbk_in};
    end
  end

  // ---- counting clocks ----------------------------------------------------
  logic tick_p, tick_i, tick_d, tick_a, tick_s;

  rate_gen u_rate_p (.clk, .rst_n, .inc(inc_p), .tick(tick_p));
  rate_gen u_rate_i (.clk, .rst_n, .inc(inc_i), .tick(tick_i));
  rate_gen u_rate_d (.clk, .rst_n, .inc(inc_d), .tick(tick_d));
  rate_gen u_rate_a (.clk, .rst_n, .inc(inc_a), .tick(tick_a));
  rate_gen u_rate_s (.clk, .rst_n, .inc(inc_s), .tick(tick_s));

  // ---- compensator ----------------------------------------------------------
  adpid_core #(.CNT_W(CNT_W), .IMPL(IMPL)) u_core (
    .clk, .rst_n,
    .ref_i   (ref_sync[1]),
    .fdbk_i  (fdbk_sync[1]),
    .tick_p, .tick_i, .tick_d, .tick_a, .tick_s,
    .pwm_out,
    .cnt_out,
    .esgn    (err_sgn),
    .emag_n  (err_mag_n),
    .err_begin(),
    .err_end  (),
    .p_cnt   (),
    .i_cnt   (),
    .d_cnt   (),
    .d_latch (),
    .a_latch (),
    .cout_n  ()
  );

endmodule
