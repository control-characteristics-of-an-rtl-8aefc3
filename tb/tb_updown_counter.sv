// tb_updown_counter -- self-checking testbench for updown_counter.
//
// Two instances are driven with the same random stimulus: the 16-bit default
// and a 4-bit one that wraps often. A reference model kept as an integer in
// the testbench predicts q after every clock (load priority, enables, wrap
// modulo 2**N) and the combinational carry cout_n before every clock.
// Directed phases first walk the 4-bit counter through both wrap directions.
module tb_updown_counter;
  logic clk = 1'b0;
  logic rst_n;
  logic cnt_clk_en, u_d, en_p_n, en_t_n, load_n;
  logic [15:0] din;
  logic [15:0] q16;
  logic [3:0]  q4;
  logic        c16, c4;
  int checks = 0, failures = 0;
  int wraps = 0;

  updown_counter #(.N(16)) dut16 (.clk, .rst_n, .cnt_clk_en, .u_d, .en_p_n,
    .en_t_n, .load_n, .din(din), .q(q16), .cout_n(c16));
  updown_counter #(.N(4)) dut4 (.clk, .rst_n, .cnt_clk_en, .u_d, .en_p_n,
    .en_t_n, .load_n, .din(din[3:0]), .q(q4), .cout_n(c4));

  always #5 clk = ~clk;

  longint m16, m4;   // model counts

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // apply one cycle of stimulus, check carry before and count after the edge
  task automatic step(input bit ce, input bit ud, input bit pn, input bit tn,
                      input bit ln, input logic [15:0] d);
    bit en;
    cnt_clk_en = ce; u_d = ud; en_p_n = pn; en_t_n = tn; load_n = ln; din = d;
    #1;
    check(c16 == !(!tn && (ud ? (m16 == 65535) : (m16 == 0))), "cout16");
    check(c4  == !(!tn && (ud ? (m4 == 15) : (m4 == 0))), "cout4");
    en = ce && !pn && !tn;
    if (!ln) begin
      m16 = d; m4 = d[3:0];
    end else if (en) begin
      if (!c4) wraps++;
      m16 = (m16 + (ud ? 1 : -1) + 65536) % 65536;
      m4  = (m4 + (ud ? 1 : -1) + 16) % 16;
    end
    @(posedge clk); #1;
    check(q16 == m16[15:0], "q16");
    check(q4 == m4[3:0], "q4");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cnt_clk_en = 0; u_d = 1; en_p_n = 1; en_t_n = 1; load_n = 1; din = 0;
    m16 = 0; m4 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q16 == 0 && q4 == 0, "reset");
    // count up through a 4-bit wrap
    repeat (20) step(1, 1, 0, 0, 1, 16'h0);
    // count down through zero
    repeat (40) step(1, 0, 0, 0, 1, 16'h0);
    // strobe low or an enable high: no count
    repeat (5) step(0, 1, 0, 0, 1, 16'h0);
    repeat (5) step(1, 1, 1, 0, 1, 16'h0);
    repeat (5) step(1, 1, 0, 1, 1, 16'h0);
    // load beats counting; load without strobe
    step(1, 1, 0, 0, 0, 16'hFFFE);
    step(0, 1, 1, 1, 0, 16'hFFFF);
    step(1, 1, 0, 0, 1, 16'h0);     // 16-bit wrap up
    step(1, 0, 0, 0, 0, 16'h0001);
    repeat (3) step(1, 0, 0, 0, 1, 16'h0);   // 16-bit wrap down
    // random
    repeat (20000)
      step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 3) == 0,
           $urandom_range(0, 3) == 0, $urandom_range(0, 15) != 0, 16'($urandom));
    check(wraps > 0, "wraps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
