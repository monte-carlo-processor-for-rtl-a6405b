// tb_mcp_config: checks reset values and the boot reseed pulse, writes and
// reads back every register, the self-clearing reseed bit, the one-clock
// read latency, and capture of scaler results with the gate counter.
module tb_mcp_config;
  import mcp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_we = 0, bus_re = 0, bus_rvalid;
  logic [7:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  mcp_cfg_t cfg;
  logic scl_valid = 0;
  logic [NLEV-1:0][CNT_W-1:0] scl_counts = '0;
  int checks = 0, failures = 0;
  int reseeds = 0;

  mcp_config dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cfg.reseed) reseeds++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(posedge clk); #1 bus_we = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(posedge clk); #1 bus_re = 0;
    check(bus_rvalid, "rvalid one clock after read");
    d = bus_rdata;
    @(posedge clk); #1;
    check(!bus_rvalid, "rvalid is a single clock");
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] vals[11];
    logic [7:0] addrs[9] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h08, 8'h09, 8'h0A, 8'h00};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk); #1;
    check(reseeds == 1, "one reseed pulse after reset");
    check(cfg.width == 16'd30, "width resets to 30 clocks (600 ns)");
    check(!cfg.run && cfg.m1 == 0, "stopped after reset");
    check(cfg.seed == SEED_RESET, "seed reset value");
    foreach (addrs[i]) begin
      vals[i] = $urandom;
      if (addrs[i] == 8'h05) vals[i] &= 32'hFFFF;
      if (addrs[i] == 8'h00) vals[i] = 32'h1;
      wr(addrs[i], vals[i]);
    end
    check(cfg.m1 == vals[0] && cfg.m2 == vals[1] && cfg.m3 == vals[2] && cfg.m4 == vals[3], "m1..m4");
    check(cfg.width == vals[4][15:0], "width");
    check(cfg.seed == {vals[7], vals[6], vals[5]}, "seed");
    check(cfg.run, "run");
    foreach (addrs[i]) begin
      rd(addrs[i], d);
      check(d == vals[i], $sformatf("read back reg %h", addrs[i]));
    end
    wr(8'h00, 32'h3);
    check(cfg.reseed && cfg.run, "reseed pulse on write");
    @(posedge clk); #1;
    check(!cfg.reseed, "reseed self-clears");
    check(reseeds == 2, "two reseed pulses in total");
    for (int g = 1; g <= 3; g++) begin
      for (int n = 0; n < NLEV; n++) scl_counts[n] = $urandom;
      scl_valid = 1; @(posedge clk); #1 scl_valid = 0;
      for (int n = 0; n < NLEV; n++) begin
        rd(8'h10 + 8'(n), d);
        check(d == scl_counts[n], $sformatf("scaler %0d", n));
      end
      rd(8'h14, d);
      check(d == g, "scaler gate count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
