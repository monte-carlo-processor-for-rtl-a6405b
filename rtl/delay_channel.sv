// delay_channel: one output channel of the pattern generator.
//
// A 'start' strobe latches a delay d (M bits, 0.5 ns units). From the next
// clock on the channel emits, each 250 MHz clock c = 0, 1, 2, ..., an 8-bit
// word 'os' whose bit i stands for the sub-sample at time (8c + i) x 0.5 ns
// after the reference (bit 0 earliest). Bit i is high while
// d <= 8c + i < d + PW, so the pulse starts d half-nanoseconds after the
// reference and lasts PW half-nanoseconds (40 = 20 ns by default).
// The coarse part of the delay (upper M-3 bits, 4 ns steps) is a clock
// counter, the slow bank; the fine part (lower 3 bits) selects the sub-sample,
// the fast bank of eight phases. A downstream output stage (phase-shifted
// clocks used on both edges, or a serialiser) must place the eight
// sub-samples 0.5 ns apart; it is not part of this module. The document asks
// for 0.5 ns resolution at 250 MHz, which is eight instants per clock. The
// counter in place of a long register bank, and one pending pulse per
// channel (a new start replaces it), are this design's choices.
module delay_channel #(
  parameter int unsigned M  = 10,
  parameter int unsigned PW = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] dly,
  output logic [7:0]   os
);

  localparam int unsigned PW_BITS = $clog2(PW + 1);
  localparam int unsigned PO_W = (M > PW_BITS ? M : PW_BITS) + 2;

  logic [M-1:0]    d_q;
  logic [PO_W-4:0] c;      // coarse clock counter
  logic            active;
  logic [PO_W-1:0] pos, lo, hi;
  logic [7:0]      word;
  logic            done;

  always_comb begin
    pos = {c, 3'b000};
    lo  = PO_W'(d_q);
    hi  = PO_W'(d_q) + PO_W'(PW);
    for (int i = 0; i < 8; i++)
      word[i] = active && (pos + PO_W'(i) >= lo) && (pos + PO_W'(i) < hi);
    done = (pos + PO_W'(8) >= hi);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q    <= '0;
      c      <= '0;
      active <= 1'b0;
      os     <= '0;
    end else begin
      os <= word;
      if (start) begin
        d_q    <= dly;
        c      <= '0;
        active <= 1'b1;
        os     <= '0;
      end else if (active) begin
        c <= c + 1'b1;
        if (done) active <= 1'b0;
      end
    end
  end

endmodule
