// tb_pattern_generator: loads the sampler table with the inverse cumulative
// distribution of a Gaussian (mean 255 ns, sigma 60 ns, in 0.5 ns units),
// then runs fixed-rate events and, at a high Poisson rate, overlapping event
// requests, then replays stored patterns (random hit masks and delays)
// offered on the pattern stream at irregular times. For every event it rebuilds each channel's 0.5 ns sub-sample
// stream from the event window's rising edge and checks that the pulse starts
// exactly at the channel's reported delay and lasts 20 ns, and that channels
// outside a replayed pattern's mask stay silent. The sampled delays of all
// channels and events must have the programmed mean and sigma. Fixed-rate
// events, Poisson events, dropped requests, replayed events and events that
// wait for their pattern must each occur.
module tb_pattern_generator;
  import pg_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0;
  logic [95:0] seed = 96'hC0DE_0000_1234_5678_9ABC_DEF1;
  logic ev_en = 0, ev_mode = 1;
  logic [31:0] ev_p = '0, ev_period = 32'd400;
  logic lut_we = 0;
  logic [RND_N-1:0] lut_waddr = '0;
  logic [DLY_M-1:0] lut_wdata = '0;
  logic [NCH-1:0][OS-1:0] os;
  logic evt_window, evt_start, busy;
  logic [NCH-1:0][DLY_M-1:0] evt_dly;
  logic [15:0] dropped;
  logic src_ext = 0, pat_valid = 0, pat_ready;
  logic [NCH-1:0] pat_mask = '0, hit_mask;
  logic [NCH-1:0][DLY_M-1:0] pat_dly = '0;
  int checks = 0, failures = 0;

  pattern_generator dut (.*);
  always #2 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // ---- event monitor: rebuild pulses relative to the window edge
  int c = -1, n_events = 0, n_fixed = 0, n_poisson = 0;
  int first[NCH], last[NCH], nhigh[NCH];
  logic [NCH-1:0][DLY_M-1:0] d_cap;
  logic [NCH-1:0] m_cap;
  bit ext_cap;
  int n_ext = 0;
  logic win_prev = 0;
  real s = 0.0, s2 = 0.0;
  int ns = 0;
  always @(posedge clk) begin
    #1;
    if (evt_window && !win_prev) begin
      c = 0; d_cap = evt_dly; m_cap = hit_mask; ext_cap = src_ext;
      if (src_ext) n_ext++;
      for (int k = 0; k < NCH; k++) begin first[k] = -1; last[k] = -1; nhigh[k] = 0; end
      if (!src_ext) begin if (ev_mode) n_fixed++; else n_poisson++; end
    end
    win_prev = evt_window;
    if (c >= 0) begin
      for (int k = 0; k < NCH; k++)
        for (int i = 0; i < OS; i++)
          if (os[k][i]) begin
            if (first[k] < 0) first[k] = OS * c + i;
            last[k] = OS * c + i; nhigh[k]++;
          end
      c++;
      if (c == 136) begin
        for (int k = 0; k < NCH; k++) begin
          checks++;
          if (!m_cap[k]) begin
            if (nhigh[k] != 0) begin failures++; $display("masked channel %0d fired", k); end
          end else if (first[k] != d_cap[k] || last[k] != d_cap[k] + PW_SUB - 1 || nhigh[k] != PW_SUB) begin
            failures++;
            if (failures < 10) $display("event %0d ch %0d: dly %0d first %0d last %0d n %0d",
                                        n_events, k, d_cap[k], first[k], last[k], nhigh[k]);
          end
          if (!ext_cap) begin s += d_cap[k]; s2 += real'(d_cap[k]) ** 2; ns++; end
        end
        n_events++;
        c = -1;
      end
    end
  end

  // pattern source: offers a random pattern, holds it until taken, then
  // pauses 0..399 clocks (so that some events wait for their pattern)
  int n_taken = 0, n_waited = 0;
  initial begin
    forever begin
      @(posedge clk); #1;
      if (src_ext) begin
        automatic bit waited = 0;
        automatic int pause = $urandom % 400;
        pat_mask = NCH'($urandom);
        for (int k = 0; k < NCH; k++) pat_dly[k] = DLY_M'($urandom);
        pat_valid = 1;
        while (!pat_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;          // taken at this edge
        pat_valid = 0; n_taken++;
        for (int i = 0; i < pause; i++) begin
          @(posedge clk); #1;
          if (pat_ready && !waited) begin n_waited++; waited = 1; end
        end
      end
    end
  end

  initial begin
    real mean, sd;
    seed_load = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; seed_load = 0;
    build_table(510.0, 120.0);
    for (int u = 0; u < 2**RND_N; u++) begin
      lut_we = 1; lut_waddr = RND_N'(u); lut_wdata = table_ref[u];
      @(posedge clk); #1;
    end
    lut_we = 0;
    // fixed rate: one event every 400 clocks (1.6 us)
    ev_mode = 1; ev_en = 1;
    while (n_events < 60) begin @(posedge clk); #1; end
    ev_en = 0;
    repeat (300) @(posedge clk); #1;
    checks++; if (dropped != 0) begin failures++; $display("drops at a slow fixed rate"); end
    // Poisson: mean one request per 64 clocks, faster than an event lasts
    ev_mode = 0; ev_p = 32'h03FF_FFFF; ev_en = 1;
    while (n_events < 120) begin @(posedge clk); #1; end
    ev_en = 0;
    repeat (300) @(posedge clk); #1;
    // replay stored patterns, offered at irregular times
    src_ext = 1; ev_mode = 1; ev_period = 32'd300; ev_en = 1;
    while (n_events < 150) begin @(posedge clk); #1; end
    ev_en = 0;
    repeat (300) @(posedge clk); #1;
    src_ext = 0;
    $display("replayed events %0d, patterns taken %0d, events that waited %0d", n_ext, n_taken, n_waited);
    checks++; if (n_ext < 30 || n_taken != n_ext) begin failures++; $display("replay count mismatch"); end
    checks++; if (n_waited == 0) begin failures++; $display("no event waited for a pattern"); end
    mean = s / ns; sd = $sqrt(s2 / ns - mean * mean);
    $display("events %0d (fixed %0d, Poisson %0d), dropped %0d, delay mean %f sigma %f",
             n_events, n_fixed, n_poisson, dropped, mean, sd);
    checks++; if (n_fixed < 60 || n_poisson < 50) failures++;
    checks++; if (dropped == 0) begin failures++; $display("no dropped request"); end
    checks++; if (mean < 500.0 || mean > 520.0) failures++;
    checks++; if (sd < 110.0 || sd > 130.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
