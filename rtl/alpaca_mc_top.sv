// alpaca_mc_top: the two calibration engines side by side.
//
// mc_processor (50 MHz domain) generates random detector hits for 94
// channels with correlated coincidences and counts hit-sum trigger levels
// with a 10 Hz scaler; it is configured through a register bus.
// pattern_generator (250 MHz domain) emits 16 channels of test pulses with
// per-channel delays drawn from a programmable distribution at 0.5 ns
// resolution, or replays stored patterns offered on the pg_pat_* stream
// (the memory behind it is outside). The two share no signals; all host-side and output signals of
// both are brought out as ports (the network link and PC are outside).
module alpaca_mc_top
  import mcp_pkg::*;
  import pg_pkg::*;
(
  // ---- MC processor, 50 MHz
  input  logic                       mc_clk,
  input  logic                       mc_rst_n,
  input  logic                       bus_we,
  input  logic                       bus_re,
  input  logic [7:0]                 bus_addr,
  input  logic [31:0]                bus_wdata,
  output logic [31:0]                bus_rdata,
  output logic                       bus_rvalid,
  output logic                       scl_valid,
  output logic [NLEV-1:0][CNT_W-1:0] scl_counts,
  output logic [NDET-1:0]            det_hit,
  output logic [NDET-1:0]            det_pulse,
  output logic [$clog2(NDET+1)-1:0]  hit_sum,
  output logic [NLEV-1:0]            hit_level,
  output logic                       mc_active,
  // ---- pattern generator, 250 MHz
  input  logic                       pg_clk,
  input  logic                       pg_rst_n,
  input  logic                       pg_seed_load,
  input  logic [95:0]                pg_seed,
  input  logic                       pg_ev_en,
  input  logic                       pg_ev_mode,
  input  logic [31:0]                pg_ev_p,
  input  logic [31:0]                pg_ev_period,
  input  logic                       pg_lut_we,
  input  logic [RND_N-1:0]           pg_lut_waddr,
  input  logic [DLY_M-1:0]           pg_lut_wdata,
  output logic [NCH-1:0][OS-1:0]     pg_os,
  output logic                       pg_evt_window,
  output logic                       pg_evt_start,
  output logic [NCH-1:0][DLY_M-1:0]  pg_evt_dly,
  output logic                       pg_busy,
  output logic [15:0]                pg_dropped,
  input  logic                       pg_src_ext,
  input  logic                       pg_pat_valid,
  output logic                       pg_pat_ready,
  input  logic [NCH-1:0]             pg_pat_mask,
  input  logic [NCH-1:0][DLY_M-1:0]  pg_pat_dly,
  output logic [NCH-1:0]             pg_hit_mask
);

  mc_processor u_mcp (
    .clk(mc_clk), .rst_n(mc_rst_n),
    .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .scl_valid, .scl_counts, .det_hit, .det_pulse, .hit_sum, .hit_level,
    .gen_active(mc_active)
  );

  pattern_generator u_pg (
    .clk(pg_clk), .rst_n(pg_rst_n), .seed_load(pg_seed_load), .seed(pg_seed),
    .ev_en(pg_ev_en), .ev_mode(pg_ev_mode), .ev_p(pg_ev_p), .ev_period(pg_ev_period),
    .lut_we(pg_lut_we), .lut_waddr(pg_lut_waddr), .lut_wdata(pg_lut_wdata),
    .os(pg_os), .evt_window(pg_evt_window), .evt_start(pg_evt_start),
    .evt_dly(pg_evt_dly), .busy(pg_busy), .dropped(pg_dropped),
    .src_ext(pg_src_ext), .pat_valid(pg_pat_valid), .pat_ready(pg_pat_ready),
    .pat_mask(pg_pat_mask), .pat_dly(pg_pat_dly), .hit_mask(pg_hit_mask)
  );

endmodule
