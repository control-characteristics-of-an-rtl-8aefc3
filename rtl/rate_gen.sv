// rate_gen -- counting-clock source: turns the system clock into a stream of
// one-cycle enable strobes at a programmable average rate.
//
// The source design tunes its compensator by the frequencies of the clocks
// that drive its counters (f_P, f_I, f_D, f_A) and samples its edge
// detectors with a further pulse generator; it does not say how those
// clocks are made. This block is this design's way of making them: a
// PHASE_W-bit phase accumulator adds inc every system clock and emits a
// strobe on each carry out, so the strobe rate is f_clk * inc / 2**PHASE_W
// (adpid_pkg::freq_to_inc computes inc). inc = 0 stops the strobes, which
// grounds that counting clock and removes its term from the control law.
// Strobe spacing jitters by one system clock when the ratio is not an
// integer. Timing: tick is registered; it is high for exactly one cycle.
module rate_gen #(
  parameter int unsigned PHASE_W = adpid_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] inc,
  output logic               tick
);

  logic [PHASE_W-1:0] acc;
  logic [PHASE_W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, inc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= sum[PHASE_W-1:0];
      tick <= sum[PHASE_W];
    end
  end

endmodule
