// pg_control: main control of the pattern generator.
//
// On an event strobe from the event generator (accepted only when idle) it
// obtains one delay per channel from one of two sources:
//  - src_ext = 0, sampled: for NCH clocks it presents a fresh 16-bit uniform
//    random word to the inverse sampler and stores the value that comes back
//    one clock later as that channel's delay; all channels get a hit.
//  - src_ext = 1, replayed: it takes one stored pattern (a hit mask and NCH
//    delays) from an external memory stream with a valid/ready handshake;
//    pat_ready is high while waiting, and the event stalls until pat_valid.
// Then it pulses 'start' once for all channels, so that every delay is
// measured from the same reference, and holds the event window for EVT_CYC
// clocks (500 ns at 250 MHz). 'hit_mask' tells which channels fire.
// 'evt_window' is delayed so that it rises in the same clock in which the
// delay channels emit their first output word (two clocks after 'start').
// Events that arrive while an event is being produced are dropped and
// counted in 'dropped'. lut_addr is the random input passed straight on.
// The sequencing and the stream handshake are this design's own; the
// document gives the block's role (turning events, initial parameters and
// stored timing and hit information into per-channel hits) only.
module pg_control #(
  parameter int unsigned NCH     = 16,
  parameter int unsigned N       = 16,
  parameter int unsigned M       = 10,
  parameter int unsigned EVT_CYC = 125
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                event_i,
  input  logic [N-1:0]        rnd,
  output logic [N-1:0]        lut_addr,
  input  logic [M-1:0]        lut_dly,
  output logic                start,
  output logic [NCH-1:0][M-1:0] dly,
  output logic                evt_window,
  output logic                busy,
  output logic [15:0]         dropped,
  input  logic                src_ext,
  input  logic                pat_valid,
  output logic                pat_ready,
  input  logic [NCH-1:0]      pat_mask,
  input  logic [NCH-1:0][M-1:0] pat_dly,
  output logic [NCH-1:0]      hit_mask
);

  typedef enum logic [2:0] {IDLE, SAMPLE, FETCH, LAUNCH, WINDOW} st_e;

  localparam int unsigned IW = $clog2(NCH + 1);
  localparam int unsigned WW = $clog2(EVT_CYC + 1);

  st_e           st;
  logic [IW-1:0] idx, rd_ch;
  logic          rd_v;
  logic [WW-1:0] wcnt;
  logic          win_q;

  assign lut_addr = rnd;
  assign busy      = (st != IDLE);
  assign pat_ready = (st == FETCH);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= IDLE;
      idx        <= '0;
      rd_v       <= 1'b0;
      rd_ch      <= '0;
      wcnt       <= '0;
      start      <= 1'b0;
      win_q      <= 1'b0;
      evt_window <= 1'b0;
      dropped    <= '0;
      dly        <= '0;
      hit_mask   <= '0;
    end else begin
      start      <= 1'b0;
      win_q      <= (st == WINDOW);
      evt_window <= win_q;
      rd_v       <= (st == SAMPLE);
      rd_ch      <= idx;
      if (rd_v) dly[rd_ch[$clog2(NCH)-1:0]] <= lut_dly;
      if (event_i && st != IDLE && dropped != '1) dropped <= dropped + 1'b1;
      unique case (st)
        IDLE:   if (event_i) begin
                  idx <= '0;
                  if (src_ext) st <= FETCH;
                  else begin
                    st       <= SAMPLE;
                    hit_mask <= '1;
                  end
                end
        FETCH:  if (pat_valid) begin
                  dly      <= pat_dly;
                  hit_mask <= pat_mask;
                  st       <= LAUNCH;
                end
        SAMPLE: begin
                  idx <= idx + 1'b1;
                  if (idx == IW'(NCH - 1)) st <= LAUNCH;
                end
        LAUNCH: begin  // last LUT word is captured in this clock
                  start <= 1'b1;
                  wcnt  <= '0;
                  st    <= WINDOW;
                end
        WINDOW: begin
                  wcnt <= wcnt + 1'b1;
                  if (wcnt == WW'(EVT_CYC - 1)) st <= IDLE;
                end
        default: st <= IDLE;
      endcase
    end
  end

  // one launch per event, never while the previous window is open
  a_start_single: assert property (@(posedge clk) disable iff (!rst_n) start |=> !start);
  a_start_idle:   assert property (@(posedge clk) disable iff (!rst_n) start |-> !evt_window);
  // the pattern source must hold an offered pattern until it is taken
  a_pat_hold:     assert property (@(posedge clk) disable iff (!rst_n)
                                   pat_valid && !pat_ready |=> pat_valid);

endmodule
