// tb_jk_ff -- self-checking testbench for the J-K flip-flop.
//
// Walks every combination of J, K, enable and present state many times in
// random order and compares q and q_n after each clock with the J-K
// characteristic table (hold, set, clear, toggle; nothing without enable).
module tb_jk_ff;
  logic clk = 1'b0;
  logic rst_n, en, j, k, q, q_n;
  logic model;
  int checks = 0, failures = 0;

  jk_ff dut (.clk, .rst_n, .en, .j, .k, .q, .q_n);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; j = 0; k = 0; model = 0;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      {en, j, k} = 3'($urandom);
      @(posedge clk);
      if (en) begin
        case ({j, k})
          2'b00: model = model;
          2'b10: model = 1'b1;
          2'b01: model = 1'b0;
          2'b11: model = !model;
        endcase
      end
      @(negedge clk);
      checks++;
      if (q !== model || q_n !== !model) begin
        failures++;
        if (failures < 10) $display("FAIL en=%b j=%b k=%b q=%b q_n=%b model=%b", en, j, k, q, q_n, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
