// tb_sig_err -- self-checking testbench for the error-formation logic.
//
// Model: the source design's next-state table, transcribed here as two
// 32-bit columns indexed by {ESgn(n), REF(n-1), FDBK(n-1), REF(n), FDBK(n)}.
// The EMag column reduces to "no count while the inputs agree", so the model
// computes it as XNOR of the current inputs and checks that against the
// block as well. Phase 1 drives random input sequences and checks every
// cycle. Phase 2 drives two square waves with the reference leading and
// then lagging, and checks that counting happens only up (resp. down) and
// for the expected number of cycles per period.
module tb_sig_err;
  localparam logic [31:0] ESGN_COL = 32'hB7ED2184;

  logic clk = 1'b0;
  logic rst_n, ref_i, fdbk_i, esgn, emag_n;
  int checks = 0, failures = 0;
  logic pref, pfdbk, psgn;
  int n_up, n_down, n_hold, n_chg;

  sig_err dut (.clk, .rst_n, .ref_i, .fdbk_i, .esgn, .emag_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // drive inputs for one cycle, check outputs, advance the model history
  task automatic step(input bit r, input bit f);
    logic [4:0] idx;
    ref_i = r; fdbk_i = f;
    #1;
    idx = {psgn, pref, pfdbk, r, f};
    check(esgn == ESGN_COL[idx], "esgn");
    check(emag_n == !(r ^ f), "emag_n");
    if (!emag_n && esgn) n_up++;
    if (!emag_n && !esgn) n_down++;
    if (emag_n) n_hold++;
    if (esgn != psgn) n_chg++;
    @(posedge clk); #1;
    pref = r; pfdbk = f; psgn = ESGN_COL[idx];
  endtask

  // two square waves of period 2*half, feedback delayed by lag (negative:
  // feedback ahead); returns the count-up and count-down cycles
  task automatic waves(input int half, input int lag, input int periods,
                       output int ups, output int downs);
    int t0;
    ups = 0; downs = 0;
    for (int t = 0; t < 2 * half * periods; t++) begin
      t0 = t - lag;
      step(((t / half) % 2) == 1, ((t0 + 4 * half) / half) % 2 == 1);
      // the first period only sets up the history
      if (t >= 2 * half && !emag_n && esgn) ups++;
      if (t >= 2 * half && !emag_n && !esgn) downs++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ups, downs;
    rst_n = 0; ref_i = 0; fdbk_i = 0;
    pref = 0; pfdbk = 0; psgn = 0;
    n_up = 0; n_down = 0; n_hold = 0; n_chg = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // random, with inputs that change only sometimes
    for (int k = 0; k < 20000; k++)
      step($urandom_range(0, 3) == 0 ? !pref : pref,
           $urandom_range(0, 3) == 0 ? !pfdbk : pfdbk);
    check(n_up > 0 && n_down > 0 && n_hold > 0 && n_chg > 0, "all operations seen");
    // settle, then reference leads by 7 cycles: 2 error intervals per period
    repeat (4) step(0, 0);
    waves(50, 7, 10, ups, downs);
    check(downs == 0, "lead: no down counts");
    check(ups == 9 * 2 * 7, "lead: up-count cycles");
    // reference lags by 9 cycles
    repeat (4) step(0, 0);
    waves(50, -9, 10, ups, downs);
    check(ups == 0, "lag: no up counts");
    check(downs == 9 * 2 * 9, "lag: down-count cycles");
    $display("up=%0d down=%0d hold=%0d sign changes=%0d", n_up, n_down, n_hold, n_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
