// tb_scaler: gate of 200 clocks, 4 levels with random activity. A reference
// counts rising edges per gate; each 'valid' must come exactly 200 clocks
// after the previous one and carry the reference counts. Also checks that
// dropping 'run' restarts the gate.
module tb_scaler;
  localparam int GATE = 200;
  logic clk = 0, rst_n = 0, run = 0, valid;
  logic [3:0] lev = '0, lev_prev = '0;
  logic [3:0][31:0] counts;
  int checks = 0, failures = 0;
  int ref_cnt[4];
  int gpos = 0, ngates = 0;

  scaler #(.NLEV(4), .GATE(GATE), .CNT_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int seg = 0; seg < 3; seg++) begin
      run = 1; gpos = 0;
      foreach (ref_cnt[n]) ref_cnt[n] = 0;
      for (int c = 0; c < GATE * 10 + 37; c++) begin
        for (int n = 0; n < 4; n++) lev[n] = ($urandom % (n + 2)) == 0;
        @(posedge clk); #1;
        for (int n = 0; n < 4; n++) if (lev[n] && !lev_prev[n]) ref_cnt[n]++;
        lev_prev = lev;
        gpos++;
        if (gpos == GATE) begin
          checks++;
          if (!valid) begin failures++; $display("valid missing at gate end"); end
          for (int n = 0; n < 4; n++) begin
            checks++;
            if (counts[n] != ref_cnt[n]) begin failures++; if (failures < 10) $display("lev %0d got %0d exp %0d", n, counts[n], ref_cnt[n]); end
            ref_cnt[n] = 0;
          end
          gpos = 0; ngates++;
        end else begin
          checks++;
          if (valid) begin failures++; $display("valid at gate position %0d", gpos); end
        end
      end
      run = 0; lev = '0;
      @(posedge clk); #1; lev_prev = '0;
      @(posedge clk); #1;
    end
    checks++; if (ngates != 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
