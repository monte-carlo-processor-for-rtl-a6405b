// alfg: additive lagged Fibonacci generator with a wide parallel output.
//
// The sequence is X[n] = X[n-J] + X[n-K] mod 2^W with lags J=67, K=97, as in
// the document. The generator keeps the last K terms and, each enabled clock,
// computes the next P=127 terms at once: terms up to the J-th use only stored
// values, later ones reuse terms computed in the same clock, so the adder
// chain is two adders deep. The P new terms appear registered on 'rnd',
// 'rnd[0]' being the oldest of them, one clock after the enable; 'valid'
// is high in each clock whose 'rnd' words are new.
//
// Seeding: while 'seed_valid' is high one word per clock is shifted into the
// state (any source may supply it; the MC processor uses the LFSR). After K
// words 'ready' rises. The LSB of the first word is forced to 1 so that not
// all stored terms are even, which the generator needs for its full period;
// this and the word width W=32 are this design's choices.
module alfg #(
  parameter int unsigned W = 32,
  parameter int unsigned J = 67,
  parameter int unsigned K = 97,
  parameter int unsigned P = 127
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_valid,
  input  logic [W-1:0]        seed_word,
  input  logic                en,
  output logic                ready,
  output logic                valid,
  output logic [P-1:0][W-1:0] rnd
);

  // hist[0] is the oldest stored term, hist[K-1] the newest.
  logic [K-1:0][W-1:0]   hist;
  logic [K+P-1:0][W-1:0] ext;
  localparam int unsigned NS_W = $clog2(K+1);
  logic [NS_W-1:0] nseed;
  logic                   first;

  always_comb begin
    for (int i = 0; i < K; i++) ext[i] = hist[i];
    for (int n = K; n < K + P; n++) ext[n] = ext[n-J] + ext[n-K];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nseed <= '0;
      ready <= 1'b0;
      first <= 1'b1;
      rnd   <= '0;
      hist  <= '0;
      valid <= 1'b0;
    end else if (seed_valid) begin
      valid <= 1'b0;
      hist  <= {seed_word | W'(first), hist[K-1:1]};
      first <= 1'b0;
      ready <= (nseed == NS_W'(K - 1)) || (nseed == NS_W'(K) && ready);
      if (nseed != NS_W'(K)) nseed <= nseed + 1'b1;
    end else begin
      // a later seeding burst starts over
      first <= 1'b1;
      nseed <= '0;
      valid <= en && ready;
      if (en && ready) begin
        for (int i = 0; i < K; i++) hist[i] <= ext[P+i];
        for (int p = 0; p < P; p++) rnd[p] <= ext[K+p];
      end
    end
  end

endmodule
