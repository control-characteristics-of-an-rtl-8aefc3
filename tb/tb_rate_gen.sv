// tb_rate_gen -- self-checking testbench for the counting-clock generator.
//
// For the example counting frequencies at a 1 MHz system clock, and for a
// few edge cases (zero, one, the largest increment), the testbench counts
// strobes over a fixed window and compares with the exact expected count
// floor(window * inc / 2**32) (within one), checks that strobes are single
// cycle and, for rates up to half the clock, never adjacent, and measures
// that the spacing between strobes is within one clock of the ideal period.
module tb_rate_gen;
  import adpid_pkg::*;
  localparam int WINDOW = 200000;
  logic clk = 1'b0;
  logic rst_n;
  logic [PHASE_W-1:0] inc;
  logic tick;
  int checks = 0, failures = 0;

  rate_gen dut (.clk, .rst_n, .inc, .tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic measure(input logic [PHASE_W-1:0] v);
    longint expected;
    int n, last, gap, min_gap, max_gap;
    real ideal;
    rst_n = 0; inc = v;
    @(posedge clk); #1 rst_n = 1;
    n = 0; last = -1; min_gap = WINDOW; max_gap = 0;
    for (int t = 0; t < WINDOW; t++) begin
      @(posedge clk); #1;
      if (tick) begin
        n++;
        if (last >= 0) begin
          gap = t - last;
          if (gap < min_gap) min_gap = gap;
          if (gap > max_gap) max_gap = gap;
        end
        last = t;
      end
    end
    expected = (longint'(WINDOW) * longint'(v)) >> PHASE_W;
    check(n >= expected - 1 && n <= expected + 1, $sformatf("count for inc %0d: %0d vs %0d", v, n, expected));
    if (v != 0 && v <= 32'h8000_0000 && n > 1) begin
      ideal = (2.0 ** PHASE_W) / real'(v);
      check(real'(min_gap) > ideal - 1.0 && real'(max_gap) < ideal + 1.0, "spacing");
      check(min_gap >= 2, "not adjacent");
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(freq_to_inc(FP_HZ, CLK_HZ_DEFAULT));
    measure(freq_to_inc(FI_HZ, CLK_HZ_DEFAULT));
    measure(freq_to_inc(FD_HZ, CLK_HZ_DEFAULT));
    measure(freq_to_inc(FA_HZ, CLK_HZ_DEFAULT));
    measure(freq_to_inc(FS_HZ, CLK_HZ_DEFAULT));
    measure(32'h8000_0000);
    measure(32'd0);
    measure(32'd1);
    measure(32'hFFFF_FFFF);
    // freq_to_inc itself: 250 kHz at 1 MHz is a quarter of the range
    check(freq_to_inc(64'd250_000, 64'd1_000_000) == 32'h4000_0000, "freq_to_inc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
