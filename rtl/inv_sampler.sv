// inv_sampler: inverse-transform sampling of an arbitrary distribution.
//
// A table of 2^N entries of M bits holds the inverse cumulative distribution
// of the wanted variable: entry u is the smallest value x with
// CDF(x) >= (u + 0.5) / 2^N. Addressing it with a uniform N-bit random number
// returns x with the wanted distribution. N (16) sets how finely the
// distribution is resolved, M (10) the resolution of the delay it drives.
// The table is a single-port-write, single-port-read memory (block RAM): the
// host fills it through we/waddr/wdata; 'dly' is the entry addressed by 'rnd'
// one clock earlier. Loading by the host is this design's choice.
module inv_sampler #(
  parameter int unsigned N = 16,
  parameter int unsigned M = 10
) (
  input  logic         clk,
  input  logic         we,
  input  logic [N-1:0] waddr,
  input  logic [M-1:0] wdata,
  input  logic [N-1:0] rnd,
  output logic [M-1:0] dly
);

  logic [M-1:0] lut [2**N];

  always_ff @(posedge clk) begin
    if (we) lut[waddr] <= wdata;
    dly <= lut[rnd];
  end

endmodule
