// lfsr96: 96-bit linear feedback shift register, 32 new random bits per clock.
//
// Each enabled clock the register moves up by 32 places (bits 63:0 become
// bits 95:32) and the 32 vacated low bits are filled with feedback: bit
// (31-k) takes the XOR of old bits 95-k, 93-k, 48-k and 46-k, for k = 0..31.
// This is the recurrence of the document's uniform random number generator
// (taps 96, 94, 49, 47), evaluated 32 steps at a time. The output is the low
// 32 bits of the register, i.e. the word produced in the previous clock.
//
// Interface: 'load' copies 'seed' into the register (the owner drives it
// during reset); 'en' advances. The seed must not be all zeros. The enable
// and load inputs are this design's own choice.
module lfsr96 (
  input  logic        clk,
  input  logic        load,
  input  logic [95:0] seed,
  input  logic        en,
  output logic [31:0] rnd
);

  logic [95:0] sr;
  logic [31:0] fb;

  always_comb begin
    for (int k = 0; k < 32; k++)
      fb[31-k] = sr[95-k] ^ sr[93-k] ^ sr[48-k] ^ sr[46-k];
  end

  always_ff @(posedge clk) begin
    if (load)     sr <= seed;
    else if (en)  sr <= {sr[63:0], fb};
  end

  assign rnd = sr[31:0];

endmodule
