// adpid_pkg -- shared types and constants of the all-digital PID (ADPID)
// compensator.
//
// The compensator measures how long a reference pulse train and an encoder
// feedback pulse train disagree, by letting up/down counters run while they
// disagree. Its four tuning knobs are counting frequencies: f_P, f_I and f_D
// for the proportional, integral and derivative counters and f_A for the
// accumulator that turns the combined count back into a pulse width. A gain
// is the ratio K_N = f_N / f_A.
//
// In this RTL every counting clock is a one-cycle enable strobe made from a
// single system clock by a phase accumulator (rate_gen). freq_to_inc() turns a
// frequency in Hz into the accumulator increment for a given system clock.
// The example tuning below is the 60 rpm DC-motor example of the source
// design (f_A = 20 kHz, K_P = 1.6, K_I = 0.6, K_D = 0.04). The 1 MHz system
// clock and the 100 kHz edge-detector sampling clock are choices of this RTL;
// the source design does not give them.
package adpid_pkg;

  // Width of every counter in the compensator (16 bits in the source design).
  localparam int unsigned CNT_W_DEFAULT = 16;

  // Width of the phase accumulators that generate the counting clocks.
  localparam int unsigned PHASE_W = 32;

  // System clock assumed by the example increments below.
  localparam longint unsigned CLK_HZ_DEFAULT = 64'd1_000_000;

  // Example tuning, 60 rpm motor: f_A >= 2 * (1/K_D) * 360 Hz = 18 kHz.
  localparam longint unsigned FA_HZ = 64'd20_000;
  localparam longint unsigned FP_HZ = 64'd32_000;   // K_P = 1.6
  localparam longint unsigned FI_HZ = 64'd12_000;   // K_I = 0.6
  localparam longint unsigned FD_HZ = 64'd800;      // K_D = 0.04
  // Sampling clock of the two edge detectors ("pulse generator").
  localparam longint unsigned FS_HZ = 64'd100_000;

  // Output word {ESgn, EMag} of the error-formation logic. EMag is active low
  // because it drives the active-low EN_T of the counters; ESgn drives U_D.
  typedef enum logic [1:0] {
    ERR_CNT_DOWN = 2'b00,  // feedback leads reference: count down
    ERR_HOLD_DN  = 2'b01,  // no count, sign says down
    ERR_CNT_UP   = 2'b10,  // reference leads feedback: count up
    ERR_HOLD_UP  = 2'b11   // no count, sign says up
  } err_code_e;

  // Which counter implementation the P, I and D stages use.
  typedef enum logic {
    CNT_FUNCTIONAL = 1'b0,  // behavioural N-bit counter (updown_counter)
    CNT_CASCADE    = 1'b1   // four cascaded 4-bit 74x169 cells (16 bits only)
  } counter_impl_e;

  // Phase increment giving a strobe rate of f_hz at a clk_hz system clock:
  // rate = clk_hz * inc / 2**PHASE_W. Requires f_hz < clk_hz.
  function automatic logic [PHASE_W-1:0] freq_to_inc(input longint unsigned f_hz,
                                                      input longint unsigned clk_hz);
    longint unsigned scaled;
    scaled = (f_hz << PHASE_W) / clk_hz;
    return scaled[PHASE_W-1:0];
  endfunction

endpackage
