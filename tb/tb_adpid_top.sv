// tb_adpid_top -- closed-loop, full-size testbench of the ADPID controller.
//
// The controller (all parameters at their defaults) drives a DC motor model
// and reads back one channel of a 360-line quadrature encoder on the motor
// shaft; the reference is the encoder waveform the motor would give at the
// target speed. Plant: theta(s)/V(s) = (50/3) / (s (0.001 s + 1)(0.1 s + 1)),
// a quarter-horsepower motor with 1 ms field and 100 ms rotor time
// constants, driven with 1 V while pwm_out is high. The model is integrated
// with forward Euler at the 1 MHz system clock. Encoder channel A is high
// for the second and third quarters of every degree of shaft angle. Tuning:
// f_A = 20 kHz, f_P = 32 kHz, f_I = 12 kHz, f_D = 800 Hz, target 60 rpm
// (360 Hz encoder rate).
//
// Checks: the motor starts and its mean speed over the second half of the
// run lies within 30 % of the target; each mechanism of the compensator was
// exercised (counting up, counting down, holding, direction changes,
// interval starts that clear P and D, interval ends that load the latches,
// PWM pulses, and accumulator loads that are not positive so no pulse
// follows). SIM_SECONDS sets the simulated time.
module tb_adpid_top;
  import adpid_pkg::*;
  localparam real  SIM_SECONDS = 1.0;
  localparam real  DT          = 1.0e-6;        // 1 MHz system clock
  localparam real  TARGET_RPM  = 60.0;
  localparam real  PI          = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n, ref_in, fdbk_in;
  logic [PHASE_W-1:0] inc_p, inc_i, inc_d, inc_a, inc_s;
  logic pwm_out, err_sgn, err_mag_n;
  logic signed [CNT_W_DEFAULT-1:0] cnt_out;
  int checks = 0, failures = 0;

  adpid_top dut (.*);

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- plant and encoder -------------------------------------------------
  real x = 0.0, omega = 0.0, theta = 0.0;   // field state, speed, angle
  real ref_phase = 0.0;
  real deg, frac;
  real omega_sum = 0.0;
  longint omega_n = 0;
  longint cyc = 0;
  localparam longint CYCLES = longint'(SIM_SECONDS / DT);

  always @(posedge clk) begin
    real v;
    if (rst_n) begin
      v = pwm_out ? 1.0 : 0.0;
      x     = x + DT * (v - x) / 0.001;
      omega = omega + DT * ((50.0 / 3.0) * x - omega) / 0.1;
      theta = theta + DT * omega;
      deg   = theta * 180.0 / PI;
      frac  = deg - $floor(deg);
      fdbk_in <= (frac >= 0.25) && (frac < 0.75);
      ref_phase = ref_phase + DT * TARGET_RPM * 6.0;     // 360 lines/rev
      if (ref_phase >= 1.0) ref_phase = ref_phase - 1.0;
      ref_in <= ref_phase >= 0.5;
      cyc++;
      if (cyc > CYCLES / 2) begin
        omega_sum = omega_sum + omega;
        omega_n++;
      end
    end
  end

  // ---- mechanism counters ------------------------------------------------
  longint n_up = 0, n_down = 0, n_hold = 0, n_dirchg = 0;
  longint n_begin = 0, n_end = 0, n_pwm = 0, n_nonpos = 0;
  logic prev_sgn = 0, prev_begin = 0, prev_end = 0, prev_pwm = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (!err_mag_n && err_sgn)  n_up++;
      if (!err_mag_n && !err_sgn) n_down++;
      if (err_mag_n)              n_hold++;
      if (err_sgn != prev_sgn)    n_dirchg++;
      if (dut.u_core.err_begin && !prev_begin) begin
        n_begin++;
        if (dut.u_core.a_latch <= 0) n_nonpos++;
      end
      if (dut.u_core.err_end && !prev_end) n_end++;
      if (pwm_out && !prev_pwm) n_pwm++;
      prev_sgn   = err_sgn;
      prev_begin = dut.u_core.err_begin;
      prev_end   = dut.u_core.err_end;
      prev_pwm   = pwm_out;
    end
  end

  initial begin
    #(SIM_SECONDS * 1.0e9 * 1.2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean, target;
    rst_n = 0; ref_in = 0; fdbk_in = 0;
    inc_p = freq_to_inc(FP_HZ, CLK_HZ_DEFAULT);
    inc_i = freq_to_inc(FI_HZ, CLK_HZ_DEFAULT);
    inc_d = freq_to_inc(FD_HZ, CLK_HZ_DEFAULT);
    inc_a = freq_to_inc(FA_HZ, CLK_HZ_DEFAULT);
    inc_s = freq_to_inc(FS_HZ, CLK_HZ_DEFAULT);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 1; k <= 10; k++) begin
      repeat (int'(CYCLES / 10)) @(posedge clk);
      $display("t=%0.2f s  speed=%0.3f rad/s  angle=%0.3f rad  I=%0d", k * SIM_SECONDS / 10.0,
               omega, theta, dut.u_core.i_cnt);
    end
    target = TARGET_RPM * 2.0 * PI / 60.0;
    mean = omega_sum / real'(omega_n);
    $display("mean speed over second half %0.3f rad/s, target %0.3f rad/s", mean, target);
    $display("up=%0d down=%0d hold=%0d dirchg=%0d begin=%0d end=%0d pwm=%0d nonpos=%0d",
             n_up, n_down, n_hold, n_dirchg, n_begin, n_end, n_pwm, n_nonpos);
    check(theta > 1.0, "motor turned");
    check(mean > 0.7 * target && mean < 1.3 * target, "mean speed near target");
    check(n_up > 0, "count up happened");
    check(n_down > 0, "count down happened");
    check(n_hold > 0, "hold happened");
    check(n_dirchg > 0, "direction change happened");
    check(n_begin > 0, "interval start (P/D clear) happened");
    check(n_end > 0, "interval end (latch load) happened");
    check(n_pwm > 0, "PWM pulse happened");
    check(n_nonpos > 0, "non-positive accumulator load happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
