// rate_gen: event generator of the pattern generator, Poisson or fixed rate.
//
// mode = 0: a Bernoulli trial each clock, event when rnd <= p (Poisson-like
// stream of mean rate f_clk * (p + 1) / 2^W).
// mode = 1: an event every 'period' clocks (period >= 1), from a counter that
// restarts whenever the generator is disabled.
// 'event_o' is a registered one-clock strobe. The document names the two
// modes; the counter and the comparator are this design's simplest forms.
module rate_gen #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         mode,
  input  logic [W-1:0] p,
  input  logic [W-1:0] period,
  input  logic [W-1:0] rnd,
  output logic         event_o
);

  logic [W-1:0] cnt;
  logic         tick;

  assign tick = (cnt + 1'b1 >= period);

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      cnt     <= '0;
      event_o <= 1'b0;
    end else if (mode) begin
      event_o <= tick;
      cnt     <= tick ? '0 : cnt + 1'b1;
    end else begin
      event_o <= (rnd <= p);
      cnt     <= '0;
    end
  end

endmodule
