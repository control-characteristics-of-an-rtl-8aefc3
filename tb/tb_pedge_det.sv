// tb_pedge_det -- self-checking testbench for the clocked edge detector.
//
// The sampling strobe comes every SPAN system clocks. The testbench drives
// sig with pulses that each span several strobes and checks, from the strobe
// times alone, that every rising edge yields exactly one output pulse, that
// it starts one clock after the first strobe that sees sig high and lasts
// SPAN clocks (one sampling period), that no pulse appears without an edge,
// and that clr_n suppresses detection.
module tb_pedge_det;
  localparam int SPAN = 5;
  logic clk = 1'b0;
  logic rst_n, clk_en, sig, clr_n, edge_out;
  int checks = 0, failures = 0;
  int cyc;

  pedge_det dut (.clk, .rst_n, .clk_en, .sig, .clr_n, .edge_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // strobe every SPAN cycles
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign clk_en = (cyc % SPAN) == 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start, width, pulses, fall;
    rst_n = 0; sig = 0; clr_n = 1; cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      // raise sig at a random cycle offset, keep it high 3..6 strobes
      repeat ($urandom_range(1, 7)) @(posedge clk);
      #1 sig = 1;
      start = -1; width = 0; pulses = 0;
      fall = SPAN * $urandom_range(3, 6);
      for (int t = 0; t < SPAN * 10; t++) begin
        @(posedge clk); #1;
        if (edge_out) begin
          if (start < 0) start = t;
          width++;
        end
        if (t == fall) sig = 0;
      end
      // strobe that first saw sig=1 is at most SPAN-1 cycles after the rise
      check(start >= 0 && start < SPAN, "pulse start");
      check(width == SPAN, "pulse width");
      repeat (2 * SPAN) begin
        @(posedge clk); #1;
        check(!edge_out, "no pulse while sig low");
      end
    end
    // clear held low: no detection
    clr_n = 0;
    sig = 1;
    repeat (4 * SPAN) begin
      @(posedge clk); #1;
      check(!edge_out, "cleared");
    end
    sig = 0;
    clr_n = 1;
    repeat (4 * SPAN) @(posedge clk);
    #1 sig = 1;
    pulses = 0;
    repeat (4 * SPAN) begin
      @(posedge clk); #1;
      if (edge_out) pulses++;
    end
    check(pulses == SPAN, "pulse after clear released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
