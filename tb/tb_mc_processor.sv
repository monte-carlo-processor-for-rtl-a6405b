// tb_mc_processor: end-to-end test of the MC processor with a 3000-clock
// scaler gate (default 94 detectors). Over the register bus it sets the
// rates, pulse width and seed and starts a run. Checks:
//  - hit_sum equals the number of detector pulses (1 clock later) and the
//    levels equal sum >= 1..4 (1 clock after the sum);
//  - every scaler result equals the rising edges counted here, both on the
//    scaler port and read back over the bus, and arrives every 3000 clocks;
//  - the own-hit rate of the 94 Bernoulli generators is within 5 sigma of
//    94 * (m1 + 1) / 2^32 per clock;
//  - each Any2/3/4 injection hits exactly 2/3/4 detectors, and every one of
//    those appears on the merged detector hits;
//  - reseeding with the same seed reproduces the same hit sequence.
// Each mechanism (reseed, Any2, Any3, Any4 injection, levels 1..4, scaler
// gate) must have occurred at least once.
module tb_mc_processor;
  import mcp_pkg::*;
  localparam int GATE = 3000;
  logic clk = 0, rst_n = 0;
  logic bus_we = 0, bus_re = 0, bus_rvalid;
  logic [7:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic scl_valid, gen_active;
  logic [NLEV-1:0][CNT_W-1:0] scl_counts;
  logic [NDET-1:0] det_hit, det_pulse;
  logic [6:0] hit_sum;
  logic [NLEV-1:0] hit_level;
  int checks = 0, failures = 0;

  mc_processor #(.GATE(GATE)) dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL at %0t: %s", $time, msg); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(posedge clk); #1 bus_we = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(posedge clk); #1 bus_re = 0;
    d = bus_rdata;
  endtask

  // ---------------- continuous monitors ----------------
  int prev_pop = 0, prev_sum = 0;
  logic [NLEV-1:0] lev_q = '0;
  int ref_cnt[NLEV];
  int gate_pos = 0, ngates = 0;
  int lev_edges[NLEV] = '{0, 0, 0, 0};
  int n_any[3] = '{0, 0, 0};
  longint own_hits = 0, active_clocks = 0;
  logic [NLEV-1:0][CNT_W-1:0] last_counts;
  bit monitor_on = 0;

  always @(posedge clk) begin
    #1;
    if (monitor_on) begin
      check(int'(hit_sum) == prev_sum, "hit_sum = popcount(pulse) one clock earlier");
      for (int c = 0; c < 3; c++)
        if (dut.co_hit[c] != '0) begin
          n_any[c]++;
          check($countones(dut.co_hit[c]) == c + 2, "injection multiplicity");
          check((det_hit & dut.co_hit[c]) == dut.co_hit[c], $sformatf("Any%0d hits reach the detectors", c + 2));
        end
      if (dut.rnd_valid && gen_active) begin
        active_clocks++;
        own_hits += $countones(dut.own_hit);
      end
    end
    prev_sum = $countones(det_pulse);
  end

  // level check against the previous sum, separately for clarity
  int sum_q = 0;
  always @(posedge clk) begin
    #2;
    if (monitor_on)
      for (int n = 0; n < NLEV; n++)
        check(hit_level[n] == (sum_q >= n + 1), $sformatf("level >= %0d", n + 1));
    sum_q = hit_sum;
  end

  // scaler reference: the scaler runs while gen_active; at each clock edge it
  // sees the values of the clock before, which are kept here as *_pre.
  logic [NLEV-1:0] lev_pre = '0;
  logic act_pre = 0;
  always @(posedge clk) begin
    #3;
    if (!act_pre) begin
      gate_pos = 0;
      foreach (ref_cnt[n]) ref_cnt[n] = 0;
    end else begin
      for (int n = 0; n < NLEV; n++)
        if (lev_pre[n] && !lev_q[n]) begin ref_cnt[n]++; lev_edges[n]++; end
      gate_pos++;
      if (gate_pos == GATE) begin
        check(scl_valid, "scaler valid at gate end");
        for (int n = 0; n < NLEV; n++) begin
          check(scl_counts[n] == ref_cnt[n], $sformatf("scaler level %0d: %0d vs %0d", n + 1, scl_counts[n], ref_cnt[n]));
          ref_cnt[n] = 0;
        end
        last_counts = scl_counts;
        gate_pos = 0; ngates++;
      end else if (scl_valid) check(0, "scaler valid inside gate");
    end
    lev_q = lev_pre;
    lev_pre = hit_level;
    act_pre = gen_active;
  end

  // ---------------- stimulus ----------------
  logic [NDET-1:0] trace1[200], trace2[200];

  task automatic wait_active();
    int t = 0;
    while (!gen_active && t < 1000) begin @(posedge clk); #1; t++; end
    check(gen_active, "generation starts after seeding");
  endtask

  initial begin
    logic [31:0] d;
    real exp_hits, sd;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    monitor_on = 1;
    wr(8'h01, 32'd214747);      // m1: 1/20000 per clock per detector
    wr(8'h02, 32'd4294967);     // m2: 1/1000 per clock
    wr(8'h03, 32'd2147483);     // m3: 1/2000
    wr(8'h04, 32'd4294967);     // m4: 1/1000
    wr(8'h05, 32'd30);          // 600 ns
    wr(8'h08, 32'h1234_5678); wr(8'h09, 32'h9ABC_DEF0); wr(8'h0A, 32'h0F1E_2D3C);
    wr(8'h00, 32'h3);           // reseed and run
    wait_active();
    for (int i = 0; i < 200; i++) begin trace1[i] = det_hit; @(posedge clk); #1; end
    // let several gates pass
    while (ngates < 12) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk); #1;
    for (int n = 0; n < NLEV; n++) begin
      rd(8'h10 + 8'(n), d);
      check(d == last_counts[n], "scaler count read over the bus");
    end
    // reseed with the same seed: the same hit sequence must follow
    wr(8'h00, 32'h3);
    @(posedge clk); #1;
    check(!gen_active, "generation pauses while reseeding");
    wait_active();
    for (int i = 0; i < 200; i++) begin trace2[i] = det_hit; @(posedge clk); #1; end
    begin
      static int same = 1, nz = 0;
      for (int i = 0; i < 200; i++) begin
        if (trace1[i] != trace2[i]) same = 0;
        nz += $countones(trace1[i]);
      end
      check(same == 1, "same seed gives the same hits");
      check(nz > 0, "hits occurred in the trace");
    end
    wr(8'h00, 32'h0);
    repeat (5) @(posedge clk); #1;
    exp_hits = real'(active_clocks) * NDET * 214748.0 / 4294967296.0;
    sd = $sqrt(exp_hits);
    $display("own hits %0d expected %f", own_hits, exp_hits);
    check(own_hits > exp_hits - 5 * sd && own_hits < exp_hits + 5 * sd, "own-hit rate");
    for (int c = 0; c < 3; c++) check(n_any[c] > 0, $sformatf("Any%0d injection occurred", c + 2));
    for (int n = 0; n < NLEV; n++) check(lev_edges[n] > 0, $sformatf("level >= %0d occurred", n + 1));
    check(ngates >= 12, "scaler gates completed");
    $display("gates %0d edges %0d %0d %0d %0d any %0d %0d %0d", ngates,
             lev_edges[0], lev_edges[1], lev_edges[2], lev_edges[3], n_any[0], n_any[1], n_any[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
