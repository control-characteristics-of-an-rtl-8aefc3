// tb_counter_74x169 -- self-checking testbench for the 4-bit 74x169 cell.
//
// Exhaustive directed walk (every value up and down, both enables, load of
// every value) followed by random stimulus, checked against an integer
// model of the part: q after every clock, rco_n before every clock.
module tb_counter_74x169;
  logic clk = 1'b0;
  logic rst_n, cnt_clk_en, u_d, p_n, t_n, load_n;
  logic [3:0] d, q;
  logic rco_n;
  int checks = 0, failures = 0;
  int model;

  counter_74x169 dut (.clk, .rst_n, .cnt_clk_en, .u_d, .p_n, .t_n, .load_n,
                      .d, .q, .rco_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t q=%0d model=%0d", what, $time, q, model);
    end
  endtask

  task automatic step(input bit ce, input bit ud, input bit pn, input bit tn,
                      input bit ln, input logic [3:0] dv);
    cnt_clk_en = ce; u_d = ud; p_n = pn; t_n = tn; load_n = ln; d = dv;
    #1;
    check(rco_n == !(!tn && (ud ? model == 15 : model == 0)), "rco_n");
    if (!ln) model = dv;
    else if (ce && !pn && !tn) model = (model + (ud ? 1 : 15)) % 16;
    @(posedge clk); #1;
    check(q == 4'(model), "q");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cnt_clk_en = 0; u_d = 1; p_n = 1; t_n = 1; load_n = 1; d = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (34) step(1, 1, 0, 0, 1, 0);
    repeat (34) step(1, 0, 0, 0, 1, 0);
    for (int v = 0; v < 16; v++) begin
      step(0, 1, 1, 1, 0, 4'(v));
      step(1, 1, 1, 0, 1, 0);
      step(1, 0, 0, 1, 1, 0);
    end
    repeat (5000)
      step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 3) == 0,
           $urandom_range(0, 3) == 0, $urandom_range(0, 7) != 0, 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
