// tb_counter16_cascade -- self-checking testbench for the 16-bit counter made
// of four 74x169 cells.
//
// Directed loads just below every 4-bit boundary check that the carries
// ripple through all cells in both directions; random stimulus follows. An
// integer model predicts q after each clock and cout_n before it.
module tb_counter16_cascade;
  logic clk = 1'b0;
  logic rst_n, cnt_clk_en, u_d, en_p_n, en_t_n, load_n;
  logic [15:0] din, q;
  logic cout_n;
  int checks = 0, failures = 0;
  int model;

  counter16_cascade dut (.clk, .rst_n, .cnt_clk_en, .u_d, .en_p_n, .en_t_n,
                         .load_n, .din, .q, .cout_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t q=%h model=%h", what, $time, q, model);
    end
  endtask

  task automatic step(input bit ce, input bit ud, input bit pn, input bit tn,
                      input bit ln, input logic [15:0] dv);
    cnt_clk_en = ce; u_d = ud; en_p_n = pn; en_t_n = tn; load_n = ln; din = dv;
    #1;
    check(cout_n == !(!tn && (ud ? model == 65535 : model == 0)), "cout_n");
    if (!ln) model = dv;
    else if (ce && !pn && !tn) model = (model + (ud ? 1 : 65535)) % 65536;
    @(posedge clk); #1;
    check(q == 16'(model), "q");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] edges [6] = '{16'h000E, 16'h00FE, 16'h0FFE, 16'hFFFE, 16'h7FFE, 16'h8FFE};
    rst_n = 0; cnt_clk_en = 0; u_d = 1; en_p_n = 1; en_t_n = 1; load_n = 1; din = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (edges[k]) begin
      step(0, 1, 1, 1, 0, edges[k]);
      repeat (4) step(1, 1, 0, 0, 1, 0);
      repeat (4) step(1, 0, 0, 0, 1, 0);
    end
    step(0, 0, 1, 1, 0, 16'h0001);
    repeat (4) step(1, 0, 0, 0, 1, 0);
    repeat (20000)
      step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 3) == 0,
           $urandom_range(0, 3) == 0, $urandom_range(0, 15) != 0, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
