// pedge_det -- clocked rising-edge detector with a held output pulse.
//
// Two D flip-flops in series sample sig on the edge detector's own sampling
// clock (the "pulse generator"); the output is the first flip-flop's Q AND
// the inverse of the second's. A rising edge of sig therefore gives a pulse
// that starts at the first sampling-clock edge after the rise and lasts one
// full sampling-clock period, which is how the source design holds its
// counter load pulses long enough to be seen. clr_n clears both flip-flops.
// Interface: clk is the system clock, clk_en the one-cycle strobe marking a
// sampling-clock edge, sig the monitored signal, edge_out the pulse.
// Timing: edge_out rises one system clock after the first strobe that sees
// sig high and falls one system clock after the next strobe.
// Own choices: the sampling clock is a strobe in the system clock domain,
// and clr_n acts synchronously (every system clock) instead of
// asynchronously, so the flip-flops keep a single asynchronous reset.
module pedge_det (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_en,
  input  logic sig,
  input  logic clr_n,
  output logic edge_out
);

  logic q1, q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (!clr_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (clk_en) begin
      q1 <= sig;
      q2 <= q1;
    end
  end

  assign edge_out = q1 && !q2;

endmodule
