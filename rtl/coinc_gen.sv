// coinc_gen: correlated hit generator ("Any MULT coincidence").
//
// It models background events in which one cosmic ray hits MULT detectors at
// the same time. Each enabled clock it makes a Bernoulli trial
// (rnd_rate <= p, as for a single detector); on success it sets MULT bits of
// 'hits' in the same clock. The document gives the rates m2, m3, m4 of such
// generators but not which detectors they hit: here the first channel is
// drawn uniformly as base = (rnd_sel * NCH) >> W and the hit channels are
// base, base+1, ..., base+MULT-1, wrapping modulo NCH (this design's choice).
//
// Timing: 'hits' is registered, one clock after the random inputs.
module coinc_gen #(
  parameter int unsigned NCH  = 94,
  parameter int unsigned MULT = 2,
  parameter int unsigned W    = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [W-1:0]   rnd_rate,
  input  logic [W-1:0]   p,
  input  logic [W-1:0]   rnd_sel,
  output logic [NCH-1:0] hits
);

  localparam int unsigned CH_W = $clog2(NCH);

  logic [W+CH_W-1:0] prod;
  logic [CH_W-1:0]   base;
  logic [NCH-1:0]    pattern;

  always_comb begin
    prod    = (W+CH_W)'(rnd_sel) * (W+CH_W)'(NCH);
    base    = prod[W +: CH_W];
    pattern = '0;
    for (int m = 0; m < MULT; m++) begin
      if (int'(base) + m < NCH) pattern[int'(base) + m] = 1'b1;
      else                      pattern[int'(base) + m - NCH] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                   hits <= '0;
    else if (en && rnd_rate <= p) hits <= pattern;
    else                          hits <= '0;
  end

endmodule
