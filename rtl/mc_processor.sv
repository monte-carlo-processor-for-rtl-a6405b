// mc_processor: Monte Carlo generator of detector hits with a hit-sum
// trigger and scaler, emulating a surface air shower array.
//
// Random numbers: a 96-bit LFSR seeds an additive lagged Fibonacci generator
// (ALFG, lags 67/97) that delivers 127 independent 32-bit words per clock.
// The ALFG replaces one LFSR per channel, whose outputs were found to be
// correlated in time. After reset or a reseed command the LFSR is loaded with
// the seed register and feeds 97 words into the ALFG; generation starts when
// the ALFG is ready and 'run' is set.
//
// Hits: word i (i < NDET) drives the Bernoulli trial of detector i with
// threshold m1. Three coincidence generators (Any2, Any3, Any4; thresholds
// m2..m4; words NDET..NDET+2 for the trial and NDET+3..NDET+5 for the channel
// choice) add simultaneous hits in 2, 3 or 4 detectors. A detector's own hit
// and the injected ones are merged by OR (this design's choice of merging).
//
// Trigger: hits are stretched to 'width' clocks (600 ns by default), the
// number of overlapping pulses is compared with 1..4, and the scaler counts
// each level's rising edges over 0.1 s gates. The scaler result appears on
// scl_valid/scl_counts and in the register file.
//
// Latency from a random word to the scaler input: ALFG register, trial
// register, pulse (counter) register, sum register, level register.
module mc_processor
  import mcp_pkg::*;
#(
  parameter int unsigned NDET_P = NDET,
  parameter int unsigned GATE   = SCL_GATE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          bus_we,
  input  logic                          bus_re,
  input  logic [7:0]                    bus_addr,
  input  logic [31:0]                   bus_wdata,
  output logic [31:0]                   bus_rdata,
  output logic                          bus_rvalid,
  output logic                          scl_valid,
  output logic [NLEV-1:0][CNT_W-1:0]    scl_counts,
  output logic [NDET_P-1:0]             det_hit,
  output logic [NDET_P-1:0]             det_pulse,
  output logic [$clog2(NDET_P+1)-1:0]   hit_sum,
  output logic [NLEV-1:0]               hit_level,
  output logic                          gen_active
);

  localparam int unsigned NRND = 127;
  localparam int unsigned ALFG_K = 97;

  // the ALFG must supply NDET + 6 words per clock
  if (NDET_P + 6 > NRND) begin : g_too_many
    $error("mc_processor: NDET_P + 6 must not exceed %0d", NRND);
  end

  mcp_cfg_t cfg;

  mcp_config u_cfg (
    .clk, .rst_n, .bus_we, .bus_re, .bus_addr, .bus_wdata,
    .bus_rdata, .bus_rvalid, .cfg, .scl_valid, .scl_counts
  );

  // ---------------- seeding sequence ----------------
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SEED} seed_st_e;
  seed_st_e             sst;
  logic [6:0]           sidx;
  logic                 lfsr_load, seed_valid, alfg_ready, rnd_valid;
  logic [RND_W-1:0]     lfsr_word;
  logic [NRND-1:0][RND_W-1:0] rnd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sst  <= S_IDLE;
      sidx <= '0;
    end else if (cfg.reseed) begin
      sst <= S_LOAD;     // a reseed request restarts seeding at any time
    end else begin
      unique case (sst)
        S_IDLE: ;
        S_LOAD: begin sst <= S_SEED; sidx <= '0; end
        S_SEED: begin
                  sidx <= sidx + 1'b1;
                  if (sidx == 7'(ALFG_K - 1)) sst <= S_IDLE;
                end
        default: sst <= S_IDLE;
      endcase
    end
  end

  assign lfsr_load  = (sst == S_LOAD) || !rst_n;
  assign seed_valid = (sst == S_SEED);

  lfsr96 u_lfsr (
    .clk, .load(lfsr_load), .seed(cfg.seed), .en(1'b1), .rnd(lfsr_word)
  );

  assign gen_active = cfg.run && alfg_ready && (sst == S_IDLE);

  alfg #(.W(RND_W), .J(67), .K(ALFG_K), .P(NRND)) u_alfg (
    .clk, .rst_n, .seed_valid, .seed_word(lfsr_word),
    .en(gen_active), .ready(alfg_ready), .valid(rnd_valid), .rnd
  );

  // ---------------- hit generation ----------------
  logic [NDET_P-1:0] own_hit;
  logic [2:0][NDET_P-1:0] co_hit;
  logic [2:0][RND_W-1:0]  co_p;

  assign co_p = {cfg.m4, cfg.m3, cfg.m2};

  for (genvar i = 0; i < NDET_P; i++) begin : g_det
    poisson_gen #(.W(RND_W)) u_pg (
      .clk, .rst_n, .en(gen_active && rnd_valid), .rnd(rnd[i]), .p(cfg.m1), .event_o(own_hit[i])
    );
  end

  for (genvar c = 0; c < 3; c++) begin : g_coin
    coinc_gen #(.NCH(NDET_P), .MULT(c + 2), .W(RND_W)) u_cg (
      .clk, .rst_n, .en(gen_active && rnd_valid),
      .rnd_rate(rnd[NDET_P + c]), .p(co_p[c]), .rnd_sel(rnd[NDET_P + 3 + c]),
      .hits(co_hit[c])
    );
  end

  assign det_hit = own_hit | co_hit[0] | co_hit[1] | co_hit[2];

  // ---------------- trigger and scaler ----------------
  pulse_stretch #(.NCH(NDET_P), .CW(PW_W)) u_ps (
    .clk, .rst_n, .hit(det_hit), .width(cfg.width), .pulse(det_pulse)
  );

  hit_sum_trigger #(.NCH(NDET_P), .NLEV(NLEV)) u_hst (
    .clk, .rst_n, .pulse(det_pulse), .sum(hit_sum), .ge(hit_level)
  );

  scaler #(.NLEV(NLEV), .GATE(GATE), .CNT_W(CNT_W)) u_scl (
    .clk, .rst_n, .run(gen_active), .lev(hit_level), .valid(scl_valid), .counts(scl_counts)
  );

endmodule
