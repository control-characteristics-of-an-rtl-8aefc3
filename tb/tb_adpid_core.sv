// tb_adpid_core -- self-checking testbench for the ADPID compensator core.
//
// The testbench drives the counting-clock strobes itself (P every 2 clocks,
// I every 16, D every 8, A every clock, edge detectors every clock) and two
// square waves of period 400 clocks, the feedback delayed by LAG clocks.
// Each half period therefore has one error interval of LAG clocks. Checks:
//   * at each interval end the P, D counts equal the interval width scaled
//     by their strobe rates (within 2), and I has moved by its share;
//   * the A latch takes exactly the saturated P + I + D - D_latch(previous)
//     and the D latch takes D;
//   * after each interval start the PWM output is high for exactly as many
//     clocks as the A latch held (A counts down one per clock), and stays
//     low when that value is not positive;
//   * the counts are negative when the feedback leads;
//   * a step in LAG shows up as a derivative term D - D_latch of the
//     expected size.
module tb_adpid_core;
  import adpid_pkg::*;
  localparam int CNT_W = 16;
  localparam int HALF  = 200;

  logic clk = 1'b0;
  logic rst_n, ref_i, fdbk_i;
  logic tick_p, tick_i, tick_d, tick_a, tick_s;
  logic pwm_out, esgn, emag_n, err_begin, err_end;
  logic signed [CNT_W-1:0] cnt_out, p_cnt, i_cnt, d_cnt, d_latch, a_latch;
  logic [3:0] cout_n;
  int checks = 0, failures = 0;

  adpid_core #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // strobes
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign tick_p = (cyc % 2) == 0;
  assign tick_i = (cyc % 16) == 0;
  assign tick_d = (cyc % 8) == 0;
  assign tick_a = 1'b1;
  assign tick_s = 1'b1;

  // ---- monitor: latches and PWM widths -------------------------------------
  logic prev_end = 0, prev_begin = 0;
  logic pend_latch = 0;
  logic signed [CNT_W+1:0] raw;
  logic signed [CNT_W-1:0] exp_a, exp_dl;
  int   pwm_len = 0, since_begin = 0;
  logic signed [CNT_W-1:0] a_at_begin = 0;
  bit   measuring = 0;
  bit   prev_cut = 0;    // previous pulse was still running at this start
  // values seen at the latest interval end
  int   p_end, d_end, i_end, dd_end;
  int   n_intervals = 0, n_pwm = 0, n_neg_load = 0;
  event interval_done;

  always @(negedge clk) begin
    if (rst_n) begin
      if (pend_latch) begin
        check(a_latch == exp_a, $sformatf("A latch %0d vs %0d", a_latch, exp_a));
        check(d_latch == exp_dl, "D latch");
        pend_latch = 0;
      end
      if (err_end && !prev_end) begin
        raw = (CNT_W+2)'(p_cnt) + (CNT_W+2)'(i_cnt) + (CNT_W+2)'(d_cnt) - (CNT_W+2)'(d_latch);
        if (raw > 32767) exp_a = 16'sd32767;
        else if (raw < -32768) exp_a = -16'sd32768;
        else exp_a = raw[CNT_W-1:0];
        exp_dl = d_cnt;
        p_end = p_cnt; d_end = d_cnt; i_end = i_cnt; dd_end = d_cnt - d_latch;
        pend_latch = 1;
        n_intervals++;
        -> interval_done;
      end
      if (err_begin && !prev_begin) begin
        if (measuring) begin
          if (a_at_begin > 0) begin
            // the pulse is cut short when the next interval starts first
            // a pulse still running from the previous start lasts one
            // clock into this one (pwm_out is registered)
            check(pwm_len == (a_at_begin < since_begin ? a_at_begin : since_begin)
                  + (prev_cut ? 1 : 0), $sformatf("PWM width %0d vs %0d", pwm_len, a_at_begin));
            n_pwm++;
          end else begin
            check(pwm_len == 0, "no PWM for non-positive sum");
            n_neg_load++;
          end
        end
        prev_cut = measuring && (a_at_begin > since_begin);
        measuring = 1;
        a_at_begin = a_latch;
        pwm_len = 0;
        since_begin = 0;
      end else begin
        since_begin++;
        if (pwm_out) pwm_len++;
      end
      prev_end = err_end;
      prev_begin = err_begin;
    end
  end

  // ---- stimulus ----------------------------------------------------------------
  task automatic run_waves(input int lag, input int halves);
    for (int t = 0; t < halves * HALF; t++) begin
      @(posedge clk); #1;
      ref_i  = ((t / HALF) % 2) == 1;
      fdbk_i = (((t - lag + 4 * HALF) / HALF) % 2) == 1;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int i_prev;
  initial begin
    rst_n = 0; ref_i = 0; fdbk_i = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reference leads by 40 clocks
    fork
      run_waves(40, 24);
      begin
        // the delayed feedback starts high, and reset looks like an
        // interval end: skip the first intervals
        repeat (4) @(interval_done);
        i_prev = i_end;
        repeat (16) begin
          @(interval_done);
          check(p_end >= 18 && p_end <= 22, $sformatf("P width %0d", p_end));
          check(d_end >= 4 && d_end <= 6, $sformatf("D width %0d", d_end));
          check(i_end - i_prev >= 1 && i_end - i_prev <= 4, "I increment");
          check(dd_end >= -1 && dd_end <= 1, $sformatf("steady derivative %0d", dd_end));
          i_prev = i_end;
        end
      end
    join
    // the lag doubles: derivative term of about +5 once
    fork
      run_waves(80, 4);
      begin
        @(interval_done);
        @(interval_done);
        check(d_end >= 9 && d_end <= 11, "D width after step");
      end
    join
    // feedback leads by 60 clocks: counts go negative, I falls
    fork
      run_waves(-60, 40);
      begin
        @(interval_done); @(interval_done);
        i_prev = i_end;
        repeat (30) begin
          @(interval_done);
          check(p_end <= -28 && p_end >= -32, $sformatf("P width lead %0d", p_end));
          check(i_end < i_prev, "I decreasing");
          i_prev = i_end;
        end
      end
    join
    check(n_pwm > 10, "PWM pulses measured");
    check(n_neg_load > 5, "non-positive loads measured");
    check(n_intervals > 50, "intervals");
    $display("intervals=%0d pwm=%0d negative=%0d", n_intervals, n_pwm, n_neg_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
