// tb_pg_control: a behavioural table (value = address mod 1024 XOR a key)
// stands in for the sampler with its one-clock latency. For each event the
// test checks that channel k's delay is the table value of the k-th random
// word presented after the event, that 'start' is one clock long, that the
// window lasts 125 clocks and rises two clocks after 'start', and that events
// during an event are dropped and counted. In replay mode it offers stored
// patterns (random mask and delays) late by a random number of clocks and
// checks that the event stalls until the pattern is taken, that the pattern
// is taken in exactly one clock and that its mask and delays are launched.
module tb_pg_control;
  localparam int NCH = 16, N = 16, M = 10, EVT = 125;
  logic clk = 0, rst_n = 0, event_i = 0, start, evt_window, busy;
  logic [N-1:0] rnd = '0, lut_addr;
  logic [M-1:0] lut_dly = '0;
  logic [NCH-1:0][M-1:0] dly;
  logic [15:0] dropped;
  logic src_ext = 0, pat_valid = 0, pat_ready;
  logic [NCH-1:0] pat_mask = '0, hit_mask;
  logic [NCH-1:0][M-1:0] pat_dly = '0;
  int checks = 0, failures = 0;

  pg_control #(.NCH(NCH), .N(N), .M(M), .EVT_CYC(EVT)) dut (.*);
  always #2 clk = ~clk;

  function automatic logic [M-1:0] f(logic [N-1:0] a);
    return M'(a) ^ 10'h2A5;
  endfunction

  // model of the sampler: registered lookup
  always_ff @(posedge clk) lut_dly <= f(lut_addr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] presented[$];
  int cyc = 0, t_start = -1, t_win_rise = -1, win_len = 0;
  logic win_prev = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rnd <= N'($urandom);
  end

  initial begin
    int expected_drops = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 0; e < 20; e++) begin
      repeat ($urandom % 20) @(posedge clk);
      #1 event_i = 1;
      @(posedge clk); #1 event_i = 0;
      presented.delete();
      // random words presented during the sampling clocks
      for (int k = 0; k < NCH; k++) begin
        presented.push_back(rnd);
        if (k == 5 && e % 3 == 0) begin event_i = 1; expected_drops++; end
        @(posedge clk); #1 event_i = 0;
      end
      // wait for start
      t_start = -1;
      for (int c = 0; c < 10 && t_start < 0; c++) begin
        if (start) t_start = cyc;
        else begin @(posedge clk); #1; end
      end
      checks++; if (t_start < 0) begin failures++; $display("no start"); end
      checks++; if (hit_mask != '1) begin failures++; $display("sampled event must hit all channels"); end
      for (int k = 0; k < NCH; k++) begin
        checks++;
        if (dly[k] != f(presented[k])) begin failures++; if (failures < 10) $display("ch %0d got %0d exp %0d", k, dly[k], f(presented[k])); end
      end
      @(posedge clk); #1;
      checks++; if (start) begin failures++; $display("start longer than 1 clock"); end
      checks++; if (evt_window) begin failures++; $display("window too early"); end
      @(posedge clk); #1;
      checks++; if (!evt_window) begin failures++; $display("window not 2 clocks after start"); end
      win_len = 0;
      while (evt_window && win_len < 1000) begin win_len++; @(posedge clk); #1; end
      checks++; if (win_len != EVT) begin failures++; $display("window %0d clocks", win_len); end
      checks++; if (busy) begin failures++; $display("busy after window"); end
    end
    // ---- replay mode
    src_ext = 1;
    begin
      int stalls;
      logic [NCH-1:0] m_exp;
      logic [NCH-1:0][M-1:0] d_exp;
      int n_stall_events;
      n_stall_events = 0;
      for (int e = 0; e < 20; e++) begin
        repeat ($urandom % 20) @(posedge clk);
        #1 event_i = 1;
        @(posedge clk); #1 event_i = 0;
        m_exp = NCH'($urandom); if (e == 0) m_exp = '0;
        for (int k = 0; k < NCH; k++) d_exp[k] = M'($urandom);
        stalls = $urandom % 6;
        for (int s = 0; s < stalls; s++) begin
          checks++; if (!pat_ready || start) begin failures++; $display("not waiting for the pattern"); end
          @(posedge clk); #1;
        end
        if (stalls > 0) n_stall_events++;
        pat_valid = 1; pat_mask = m_exp; pat_dly = d_exp;
        checks++; if (!pat_ready) begin failures++; $display("pat_ready low while waiting"); end
        @(posedge clk); #1 pat_valid = 0;
        checks++; if (pat_ready) begin failures++; $display("pattern taken twice"); end
        @(posedge clk); #1;
        checks++; if (!start) begin failures++; $display("no start after pattern"); end
        checks++; if (hit_mask != m_exp || dly != d_exp) begin failures++; $display("replayed pattern wrong"); end
        while (busy) begin @(posedge clk); #1; end
      end
      checks++; if (n_stall_events == 0) failures++;
    end
    src_ext = 0;
    checks++; if (dropped != expected_drops) begin failures++; $display("dropped %0d exp %0d", dropped, expected_drops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
