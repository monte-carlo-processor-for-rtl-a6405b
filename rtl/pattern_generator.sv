// pattern_generator: multi-channel test-pulse generator with random timing.
//
// It produces events for testing a trigger and TDC system: per event, each of
// NCH channels gives one 20 ns pulse whose delay from the event start follows
// a programmable distribution (e.g. a Gaussian of the arrival times in an air
// shower). Structure: a 96-bit LFSR supplies uniform random words; the event
// generator (Poisson or fixed rate) requests events; the main control draws
// one delay per channel through the inverse-sampling LUT and launches the
// NCH delay channels together; each channel outputs an 8x oversampled word
// per 250 MHz clock, i.e. 0.5 ns resolution over a 512 ns range.
//
// Instead of sampling, the control can replay stored patterns (hit mask and
// delays per event) from an external memory stream (src_ext = 1, valid/ready
// handshake on pat_*); only the channels in the mask then fire.
// Host-side inputs (set over the network link in the full system): LFSR seed
// (loaded while seed_load is high and during reset), event mode / threshold /
// period, and the LUT write port. evt_window marks the 500 ns event window and
// rises in the clock of the first output word, so that channel k's pulse
// starts dly_k x 0.5 ns after its rising edge.
module pattern_generator
  import pg_pkg::*;
#(
  parameter int unsigned NCH_P   = NCH,
  parameter int unsigned EVT_CYC_P = EVT_CYC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     seed_load,
  input  logic [95:0]              seed,
  input  logic                     ev_en,
  input  logic                     ev_mode,
  input  logic [31:0]              ev_p,
  input  logic [31:0]              ev_period,
  input  logic                     lut_we,
  input  logic [RND_N-1:0]         lut_waddr,
  input  logic [DLY_M-1:0]         lut_wdata,
  output logic [NCH_P-1:0][OS-1:0] os,
  output logic                     evt_window,
  output logic                     evt_start,
  output logic [NCH_P-1:0][DLY_M-1:0] evt_dly,
  output logic                     busy,
  output logic [15:0]              dropped,
  input  logic                     src_ext,
  input  logic                     pat_valid,
  output logic                     pat_ready,
  input  logic [NCH_P-1:0]         pat_mask,
  input  logic [NCH_P-1:0][DLY_M-1:0] pat_dly,
  output logic [NCH_P-1:0]         hit_mask
);

  logic [31:0]       rnd;
  logic              ev;
  logic [RND_N-1:0]  lut_addr;
  logic [DLY_M-1:0]  lut_dly;

  lfsr96 u_lfsr (
    .clk, .load(seed_load || !rst_n), .seed, .en(1'b1), .rnd
  );

  rate_gen #(.W(32)) u_evgen (
    .clk, .rst_n, .en(ev_en), .mode(ev_mode), .p(ev_p), .period(ev_period),
    .rnd, .event_o(ev)
  );

  inv_sampler #(.N(RND_N), .M(DLY_M)) u_lut (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .rnd(lut_addr), .dly(lut_dly)
  );

  pg_control #(.NCH(NCH_P), .N(RND_N), .M(DLY_M), .EVT_CYC(EVT_CYC_P)) u_ctl (
    .clk, .rst_n, .event_i(ev), .rnd(rnd[31:32-RND_N]), .lut_addr, .lut_dly,
    .start(evt_start), .dly(evt_dly), .evt_window, .busy, .dropped,
    .src_ext, .pat_valid, .pat_ready, .pat_mask, .pat_dly, .hit_mask
  );

  for (genvar k = 0; k < NCH_P; k++) begin : g_ch
    delay_channel #(.M(DLY_M), .PW(PW_SUB)) u_dc (
      .clk, .rst_n, .start(evt_start && hit_mask[k]), .dly(evt_dly[k]), .os(os[k])
    );
  end

endmodule
