// tb_adpid_cascade -- the controller built with cascaded 74x169-style
// counters behaves exactly like the one built with behavioural counters.
//
// Two adpid_top instances share every input: one with the default
// behavioural counters, one with IMPL = CNT_CASCADE, where the P, I and D
// counters are four 4-bit cells each. The default instance closes the loop
// around the unloaded DC motor model of tb_adpid_top (60 rpm, f_A = 20 kHz,
// K = 1.6 / 0.6 / 0.04, 1 MHz clock). Every clock the two instances'
// outputs and internal P, I, D and accumulator counts are compared; they
// must be identical. The run lasts 0.3 s of motor time, long enough for
// thousands of error intervals in both directions and for the integrator
// to go through carries between the 4-bit cells.
module tb_adpid_cascade;
  import adpid_pkg::*;
  localparam real    DT     = 1.0e-6;
  localparam real    PI     = 3.14159265358979;
  localparam longint CYCLES = 300_000;

  logic clk = 1'b0;
  logic rst_n, ref_in, fdbk_in;
  logic [PHASE_W-1:0] inc_p, inc_i, inc_d, inc_a, inc_s;
  logic pwm_f, pwm_c, sgn_f, sgn_c, mag_f, mag_c;
  logic signed [CNT_W_DEFAULT-1:0] cnt_f, cnt_c;
  int checks = 0, failures = 0;

  adpid_top u_func (
    .clk, .rst_n, .ref_in, .fdbk_in, .inc_p, .inc_i, .inc_d, .inc_a, .inc_s,
    .pwm_out(pwm_f), .cnt_out(cnt_f), .err_sgn(sgn_f), .err_mag_n(mag_f)
  );

  adpid_top #(.IMPL(CNT_CASCADE)) u_casc (
    .clk, .rst_n, .ref_in, .fdbk_in, .inc_p, .inc_i, .inc_d, .inc_a, .inc_s,
    .pwm_out(pwm_c), .cnt_out(cnt_c), .err_sgn(sgn_c), .err_mag_n(mag_c)
  );

  always #500 clk = ~clk;

  // unloaded motor and encoder, driven by the behavioural instance
  real x = 0.0, omega = 0.0, theta = 0.0, ref_phase = 0.0;
  always @(posedge clk) begin
    real deg, frac;
    if (rst_n) begin
      x     = x + DT * ((pwm_f ? 1.0 : 0.0) - x) / 0.001;
      omega = omega + DT * ((50.0 / 3.0) * x - omega) / 0.1;
      theta = theta + DT * omega;
      deg   = theta * 180.0 / PI;
      frac  = deg - $floor(deg);
      fdbk_in <= (frac >= 0.25) && (frac < 0.75);
      ref_phase = ref_phase + DT * 360.0;
      if (ref_phase >= 1.0) ref_phase = ref_phase - 1.0;
      ref_in <= ref_phase >= 0.5;
    end
  end

  int  n_i_change = 0, n_cnt_neg = 0;
  logic signed [CNT_W_DEFAULT-1:0] prev_i = '0;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if ({pwm_f, cnt_f, sgn_f, mag_f} !== {pwm_c, cnt_c, sgn_c, mag_c} ||
          u_func.u_core.p_cnt !== u_casc.u_core.p_cnt ||
          u_func.u_core.i_cnt !== u_casc.u_core.i_cnt ||
          u_func.u_core.d_cnt !== u_casc.u_core.d_cnt) begin
        failures++;
        if (failures < 10)
          $display("FAIL at %0t: pwm %b/%b cnt %0d/%0d P %0d/%0d I %0d/%0d D %0d/%0d", $time,
                   pwm_f, pwm_c, cnt_f, cnt_c, u_func.u_core.p_cnt, u_casc.u_core.p_cnt,
                   u_func.u_core.i_cnt, u_casc.u_core.i_cnt,
                   u_func.u_core.d_cnt, u_casc.u_core.d_cnt);
      end
      if (u_func.u_core.i_cnt != prev_i) n_i_change++;
      if (u_func.u_core.p_cnt < 0) n_cnt_neg++;
      prev_i = u_func.u_core.i_cnt;
    end
  end

  initial begin
    #(real'(CYCLES) * 1000.0 * 1.5);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ref_in = 0; fdbk_in = 0;
    inc_p = freq_to_inc(FP_HZ, CLK_HZ_DEFAULT);
    inc_i = freq_to_inc(FI_HZ, CLK_HZ_DEFAULT);
    inc_d = freq_to_inc(FD_HZ, CLK_HZ_DEFAULT);
    inc_a = freq_to_inc(FA_HZ, CLK_HZ_DEFAULT);
    inc_s = freq_to_inc(FS_HZ, CLK_HZ_DEFAULT);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (int'(CYCLES)) @(posedge clk);
    $display("speed %0.3f rad/s, I changed %0d times, P negative for %0d cycles",
             omega, n_i_change, n_cnt_neg);
    checks++;
    if (n_i_change < 100 || n_cnt_neg == 0) begin
      failures++;
      $display("FAIL: counters were not exercised in both directions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
