// tb_alpaca_mc_top: end-to-end run of both engines at full size (no
// parameter overrides), covering one complete 0.1 s scaler gate.
//
// MC processor (50 MHz): rates of the document's example, 820 Hz per
// detector for 94 detectors, plus Any2/Any3/Any4 coincidences at 100 Hz each,
// 600 ns pulses. Checks every hit-sum level's scaler count against rising
// edges counted here, the count read back over the bus, and the level >= 1
// count against the expectation 0.1 s * R * exp(-R * 600 ns), R being the
// total rate of independent hit groups (a hit opens a new edge only if no
// pulse is active).
// Pattern generator (250 MHz): Gaussian delays (255 ns, 60 ns) through the
// sampler table, fixed-rate events at 1.5 kEvents/s for the rest of the
// 0.1 s, then a burst of Poisson requests faster than an event lasts, then
// replay of stored patterns from the pattern stream. Every channel pulse must
// start at its reported delay and last 20 ns; masked channels stay silent.
// Mechanisms that must each occur: reseed, Any2/3/4 injection, levels
// >= 1..4, scaler gate end, fixed-rate event, Poisson event, dropped request,
// replayed event, event waiting for its pattern.
module tb_alpaca_mc_top;
  import mcp_pkg::*;
  import pg_pkg::*;
  logic mc_clk = 0, mc_rst_n = 0;
  logic bus_we = 0, bus_re = 0, bus_rvalid;
  logic [7:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic scl_valid, mc_active;
  logic [NLEV-1:0][CNT_W-1:0] scl_counts;
  logic [NDET-1:0] det_hit, det_pulse;
  logic [$clog2(NDET+1)-1:0] hit_sum;
  logic [NLEV-1:0] hit_level;
  logic pg_clk = 0, pg_rst_n = 0, pg_seed_load = 0;
  logic [95:0] pg_seed = 96'h0123_4567_89AB_CDEF_F00D_CAFE;
  logic pg_ev_en = 0, pg_ev_mode = 1;
  logic [31:0] pg_ev_p = '0, pg_ev_period = 32'd166667;  // 1.5 kHz at 250 MHz
  logic pg_lut_we = 0;
  logic [RND_N-1:0] pg_lut_waddr = '0;
  logic [DLY_M-1:0] pg_lut_wdata = '0;
  logic [NCH-1:0][OS-1:0] pg_os;
  logic pg_evt_window, pg_evt_start, pg_busy;
  logic [NCH-1:0][DLY_M-1:0] pg_evt_dly;
  logic [15:0] pg_dropped;
  logic pg_src_ext = 0, pg_pat_valid = 0, pg_pat_ready;
  logic [NCH-1:0] pg_pat_mask = '0, pg_hit_mask;
  logic [NCH-1:0][DLY_M-1:0] pg_pat_dly = '0;
  int checks = 0, failures = 0;

  alpaca_mc_top dut (.*);
  always #10 mc_clk = ~mc_clk;
  always #2  pg_clk = ~pg_clk;

  initial begin
    repeat (6_000_000) @(posedge mc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  // ================= MC processor =================
  task automatic wr(logic [7:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(posedge mc_clk); #1 bus_we = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(posedge mc_clk); #1 bus_re = 0;
    d = bus_rdata;
  endtask

  int ref_cnt[NLEV], lev_edges[NLEV] = '{0, 0, 0, 0}, n_any[3] = '{0, 0, 0};
  int gate_pos = 0, ngates = 0, n_reseed = 0;
  logic [NLEV-1:0] lev_q = '0, lev_pre = '0;
  logic act_pre = 0;
  logic [NLEV-1:0][CNT_W-1:0] last_counts;
  always @(posedge mc_clk) begin
    #3;
    if (dut.u_mcp.lfsr_load && mc_rst_n) n_reseed++;
    for (int k = 0; k < 3; k++) if (dut.u_mcp.co_hit[k] != '0) n_any[k]++;
    if (!act_pre) begin
      gate_pos = 0;
      foreach (ref_cnt[n]) ref_cnt[n] = 0;
    end else begin
      for (int n = 0; n < NLEV; n++)
        if (lev_pre[n] && !lev_q[n]) begin ref_cnt[n]++; lev_edges[n]++; end
      gate_pos++;
      if (gate_pos == SCL_GATE) begin
        check(scl_valid, "scaler valid at gate end");
        for (int n = 0; n < NLEV; n++) begin
          check(scl_counts[n] == ref_cnt[n], $sformatf("scaler level %0d: %0d vs %0d", n + 1, scl_counts[n], ref_cnt[n]));
          ref_cnt[n] = 0;
        end
        last_counts = scl_counts;
        gate_pos = 0; ngates++;
      end else if (scl_valid) check(0, "scaler valid inside gate");
    end
    lev_q = lev_pre; lev_pre = hit_level; act_pre = mc_active;
  end

  bit mc_done = 0;
  initial begin
    logic [31:0] d;
    real r, expct;
    repeat (3) @(posedge mc_clk);
    #1 mc_rst_n = 1;
    wr(REG_M1, 32'd70436);      // 820 Hz at 50 MHz
    wr(REG_M2, 32'd8589);       // 100 Hz
    wr(REG_M3, 32'd8589);
    wr(REG_M4, 32'd8589);
    wr(REG_SEED0, 32'hA5A5_0001); wr(REG_SEED1, 32'h3C3C_7777); wr(REG_SEED2, 32'h0F0F_1234);
    wr(REG_CTRL, 32'h3);        // reseed and run
    while (ngates < 1) begin @(posedge mc_clk); #1; end
    wr(REG_CTRL, 32'h0);
    rd(REG_SCL0, d);
    check(d == last_counts[0], "scaler level 1 over the bus");
    rd(REG_SCLSEQ, d);
    check(d == 1, "one gate completed");
    r = 94.0 * 50.0e6 * 70437.0 / 4294967296.0 + 3 * 50.0e6 * 8590.0 / 4294967296.0;
    expct = 0.1 * r * $exp(-r * 600.0e-9);
    $display("MC: level>=1..4 counts %0d %0d %0d %0d, expected level>=1 %f; Any2/3/4 %0d %0d %0d",
             last_counts[0], last_counts[1], last_counts[2], last_counts[3], expct, n_any[0], n_any[1], n_any[2]);
    check(last_counts[0] > expct - 5 * $sqrt(expct) && last_counts[0] < expct + 5 * $sqrt(expct), "level >= 1 rate");
    for (int k = 0; k < 3; k++) check(n_any[k] > 0, $sformatf("Any%0d occurred", k + 2));
    for (int n = 0; n < NLEV; n++) check(lev_edges[n] > 0, $sformatf("level >= %0d occurred", n + 1));
    check(n_reseed >= 2, "reseed occurred");
    mc_done = 1;
  end

  // ================= pattern generator =================
  logic [DLY_M-1:0] table_ref [2**RND_N];
  task automatic build_table(real mu, real sigma);
    real cdf[2**DLY_M];
    real acc = 0.0;
    int x = 0;
    for (int i = 0; i < 2**DLY_M; i++) begin
      acc += $exp(-0.5 * ((i - mu) / sigma) ** 2);
      cdf[i] = acc;
    end
    for (int i = 0; i < 2**DLY_M; i++) cdf[i] /= acc;
    for (int u = 0; u < 2**RND_N; u++) begin
      real q = (u + 0.5) / (2.0 ** RND_N);
      while (x < 2**DLY_M - 1 && cdf[x] < q) x++;
      table_ref[u] = DLY_M'(x);
    end
  endtask

  int c = -1, n_events = 0, n_fixed = 0, n_poisson = 0;
  int first[NCH], last[NCH], nhigh[NCH];
  logic [NCH-1:0][DLY_M-1:0] d_cap;
  logic [NCH-1:0] m_cap;
  bit ext_cap;
  int n_ext = 0;
  logic win_prev = 0;
  real s = 0.0, s2 = 0.0;
  int ns = 0;
  always @(posedge pg_clk) begin
    #1;
    if (pg_evt_window && !win_prev) begin
      c = 0; d_cap = pg_evt_dly; m_cap = pg_hit_mask; ext_cap = pg_src_ext;
      if (pg_src_ext) n_ext++;
      for (int k = 0; k < NCH; k++) begin first[k] = -1; last[k] = -1; nhigh[k] = 0; end
      if (!pg_src_ext) begin if (pg_ev_mode) n_fixed++; else n_poisson++; end
    end
    win_prev = pg_evt_window;
    if (c >= 0) begin
      for (int k = 0; k < NCH; k++)
        for (int i = 0; i < OS; i++)
          if (pg_os[k][i]) begin
            if (first[k] < 0) first[k] = OS * c + i;
            last[k] = OS * c + i; nhigh[k]++;
          end
      c++;
      if (c == 136) begin
        for (int k = 0; k < NCH; k++) begin
          if (!m_cap[k]) check(nhigh[k] == 0, "masked channel silent");
          else check(first[k] == d_cap[k] && last[k] == d_cap[k] + PW_SUB - 1 && nhigh[k] == PW_SUB,
                $sformatf("event %0d ch %0d: dly %0d first %0d n %0d", n_events, k, d_cap[k], first[k], nhigh[k]));
          if (!ext_cap) begin s += d_cap[k]; s2 += real'(d_cap[k]) ** 2; ns++; end
        end
        n_events++;
        c = -1;
      end
    end
  end

  // pattern source for replay: offers a random pattern, holds it until it is
  // taken, then pauses 0..399 clocks
  int n_taken = 0, n_waited = 0;
  initial begin
    forever begin
      @(posedge pg_clk); #1;
      if (pg_src_ext) begin
        automatic bit waited = 0;
        automatic int pause = $urandom % 400;
        pg_pat_mask = NCH'($urandom);
        for (int k = 0; k < NCH; k++) pg_pat_dly[k] = DLY_M'($urandom);
        pg_pat_valid = 1;
        while (!pg_pat_ready) begin @(posedge pg_clk); #1; end
        @(posedge pg_clk); #1;
        pg_pat_valid = 0; n_taken++;
        for (int i = 0; i < pause; i++) begin
          @(posedge pg_clk); #1;
          if (pg_pat_ready && !waited) begin n_waited++; waited = 1; end
        end
      end
    end
  end

  bit pg_done = 0;
  initial begin
    real mean, sd;
    pg_seed_load = 1;
    repeat (3) @(posedge pg_clk);
    #1 pg_rst_n = 1; pg_seed_load = 0;
    build_table(510.0, 120.0);
    for (int u = 0; u < 2**RND_N; u++) begin
      pg_lut_we = 1; pg_lut_waddr = RND_N'(u); pg_lut_wdata = table_ref[u];
      @(posedge pg_clk); #1;
    end
    pg_lut_we = 0;
    pg_ev_mode = 1; pg_ev_en = 1;
    wait (mc_done);
    @(posedge pg_clk); #1;
    pg_ev_en = 0;
    repeat (300) @(posedge pg_clk); #1;
    check(pg_dropped == 0, "no drops at 1.5 kEvents/s");
    pg_ev_mode = 0; pg_ev_p = 32'h03FF_FFFF; pg_ev_en = 1;
    begin
      int target;
      target = n_events + 20;
      while (n_events < target) begin @(posedge pg_clk); #1; end
    end
    pg_ev_en = 0;
    repeat (300) @(posedge pg_clk); #1;
    begin
      int target;
      target = n_events + 20;
      pg_src_ext = 1; pg_ev_mode = 1; pg_ev_period = 32'd300; pg_ev_en = 1;
      while (n_events < target) begin @(posedge pg_clk); #1; end
      pg_ev_en = 0;
      repeat (300) @(posedge pg_clk); #1;
      pg_src_ext = 0;
    end
    check(n_ext >= 20 && n_taken == n_ext, "replayed events");
    check(n_waited > 0, "events waited for their pattern");
    mean = s / ns; sd = $sqrt(s2 / ns - mean * mean);
    $display("PG: replayed %0d, waited %0d", n_ext, n_waited);
    $display("PG: events %0d (fixed %0d, Poisson %0d), dropped %0d, delay mean %f sigma %f (0.5 ns units)",
             n_events, n_fixed, n_poisson, pg_dropped, mean, sd);
    check(n_fixed >= 100, "fixed-rate events");
    check(n_poisson >= 20, "Poisson events");
    check(pg_dropped > 0, "dropped requests");
    check(mean > 495.0 && mean < 525.0, "delay mean");
    check(sd > 110.0 && sd < 130.0, "delay sigma");
    pg_done = 1;
  end

  initial begin
    wait (mc_done && pg_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
