// sig_err -- error-formation logic of the ADPID compensator: decides, sample
// by sample, whether the P, I and D counters count, and in which direction.
//
// A plain XOR of reference and feedback says when the two pulse trains
// differ but not which one is ahead. This block decides that from history:
// its output {ESgn, EMag} is a function of the current reference and
// feedback, the previous reference and feedback, and the previous ESgn. In
// effect the signal whose edge came first sets the direction (reference
// first: count up; feedback first: count down) and counting goes on until
// the other signal catches up. The 32-row next-state table is the source
// design's own; its rows fall into four kinds: reference leads, reference
// lags, hold (no input change: keep doing what was being done) and change of
// direction.
//
// Outputs: esgn drives the counters' U_D (1 = up), emag_n drives their
// active-low EN_T (0 = count). Output codes are listed in adpid_pkg.
// Timing: ref_i/fdbk_i must be synchronous to clk. The previous-sample
// registers and the sign register update every system clock; the outputs are
// combinational from the current inputs and those registers. The registers
// reset to zero (reset is this design's choice; the source design starts its
// memories at zero too).
module sig_err
  import adpid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ref_i,
  input  logic fdbk_i,
  output logic esgn,
  output logic emag_n
);

  logic      ref_q, fdbk_q, sgn_q;
  err_code_e code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q  <= 1'b0;
      fdbk_q <= 1'b0;
      sgn_q  <= 1'b0;
    end else begin
      ref_q  <= ref_i;
      fdbk_q <= fdbk_i;
      sgn_q  <= esgn;
    end
  end

  // Index: {ESgn(n), REF(n-1), FDBK(n-1), REF(n), FDBK(n)}.
  always_comb begin
    unique case ({sgn_q, ref_q, fdbk_q, ref_i, fdbk_i})
      // previous sign 0 (counting down / holding down)
      5'b0_00_00: code = ERR_HOLD_DN;   // hold
      5'b0_00_01: code = ERR_CNT_DOWN;  // reference lags
      5'b0_00_10: code = ERR_CNT_UP;    // change of direction
      5'b0_00_11: code = ERR_HOLD_DN;   // reference lags
      5'b0_01_00: code = ERR_HOLD_DN;   // reference lags
      5'b0_01_01: code = ERR_CNT_DOWN;  // hold
      5'b0_01_10: code = ERR_CNT_DOWN;  // reference lags
      5'b0_01_11: code = ERR_HOLD_UP;   // change of direction
      5'b0_10_00: code = ERR_HOLD_UP;   // change of direction
      5'b0_10_01: code = ERR_CNT_DOWN;  // reference lags
      5'b0_10_10: code = ERR_CNT_DOWN;  // hold
      5'b0_10_11: code = ERR_HOLD_DN;   // reference lags
      5'b0_11_00: code = ERR_HOLD_DN;   // reference lags
      5'b0_11_01: code = ERR_CNT_UP;    // change of direction
      5'b0_11_10: code = ERR_CNT_DOWN;  // reference lags
      5'b0_11_11: code = ERR_HOLD_DN;   // hold
      // previous sign 1 (counting up / holding up)
      5'b1_00_00: code = ERR_HOLD_UP;   // hold
      5'b1_00_01: code = ERR_CNT_DOWN;  // change of direction
      5'b1_00_10: code = ERR_CNT_UP;    // reference leads
      5'b1_00_11: code = ERR_HOLD_UP;   // reference leads
      5'b1_01_00: code = ERR_HOLD_DN;   // change of direction
      5'b1_01_01: code = ERR_CNT_UP;    // hold
      5'b1_01_10: code = ERR_CNT_UP;    // reference leads
      5'b1_01_11: code = ERR_HOLD_UP;   // reference leads
      5'b1_10_00: code = ERR_HOLD_UP;   // reference leads
      5'b1_10_01: code = ERR_CNT_UP;    // reference leads
      5'b1_10_10: code = ERR_CNT_UP;    // hold
      5'b1_10_11: code = ERR_HOLD_DN;   // change of direction
      5'b1_11_00: code = ERR_HOLD_UP;   // reference leads
      5'b1_11_01: code = ERR_CNT_UP;    // reference leads
      5'b1_11_10: code = ERR_CNT_DOWN;  // change of direction
      5'b1_11_11: code = ERR_HOLD_UP;   // hold
      default:    code = ERR_HOLD_DN;
    endcase
  end

  assign esgn   = code[1];
  assign emag_n = code[0];

endmodule
