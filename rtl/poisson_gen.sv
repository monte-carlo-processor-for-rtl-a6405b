// poisson_gen: one Bernoulli trial per clock, approximating a Poisson process.
//
// Every enabled clock a fresh uniform random word 'rnd' is compared with the
// threshold 'p'; the trial succeeds (event = 1) when rnd <= p, the rule given
// by the document. With clock frequency f the mean rate is
// lambda = f * (p + 1) / 2^W; for small p successive events are then spaced
// (almost) exponentially, i.e. a Poisson stream with one-clock resolution.
// Example: 820 Hz at 50 MHz needs p = 70436 for W = 32.
//
// Timing: 'event' is registered, one clock after the 'rnd' it was drawn from.
// The register and the enable are this design's own choices.
module poisson_gen #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] rnd,
  input  logic [W-1:0] p,
  output logic         event_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) event_o <= 1'b0;
    else        event_o <= en && (rnd <= p);
  end

endmodule
